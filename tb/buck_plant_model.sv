`timescale 1ns/1ps
// buck_plant_model: behavioural model of the synchronous buck power stage and
// its LC filter, for closing the control loop in simulation (not part of the
// controller). Switch node: Vg while the high-side switch is on (d1), 0 V
// while the low-side switch is on (d2), and one body-diode drop (-0.7 V) in
// the dead-times while the inductor carries current. The filter is
// L = 0.67 uH, C = 230 uF, with an ideal current-source load i_load_a. The
// state is integrated with forward Euler at every switch edge and at least
// every STEP_NS, and the output voltage is reported in microvolts.
module buck_plant_model #(
  parameter real VG      = 12.0,
  parameter real L_H     = 0.67e-6,
  parameter real C_F     = 230e-6,
  parameter real STEP_NS = 2.5
) (
  input  logic               d1,
  input  logic               d2,
  input  real                i_load_a,
  input  real                v_init,
  input  real                i_init,
  input  logic               init,
  output logic signed [31:0] vout_uv,
  output real                v_out,
  output real                i_l
);
  realtime t_last = 0;
  logic d1_q = 0, d2_q = 0;

  task automatic advance();
    real dt, vsw, h;
    dt = ($realtime - t_last) * 1e-9;
    while (dt > 0.0) begin
      h = (dt > STEP_NS * 1e-9) ? STEP_NS * 1e-9 : dt;
      if (d1_q)            vsw = VG;
      else if (d2_q)       vsw = 0.0;
      else if (i_l > 0.0)  vsw = -0.7;
      else                 vsw = VG + 0.7;
      i_l   = i_l + (vsw - v_out) / L_H * h;
      v_out = v_out + (i_l - i_load_a) / C_F * h;
      dt = dt - h;
    end
    t_last  = $realtime;
    vout_uv = 32'(int'(v_out * 1e6));
  endtask

  initial begin
    v_out = 0.0; i_l = 0.0; vout_uv = 0;
    forever begin
      @(d1, d2, init) ;
      if (init) begin
        v_out = v_init; i_l = i_init; t_last = $realtime;
        vout_uv = 32'(int'(v_out * 1e6));
      end else advance();
      d1_q = d1; d2_q = d2;
    end
  end

  // While init is high the state is held at its initial values.
  always #(STEP_NS) begin
    if (init) begin
      v_out = v_init; i_l = i_init; t_last = $realtime;
      vout_uv = 32'(int'(v_out * 1e6));
    end else advance();
  end
endmodule

`timescale 1ns/1ps
// sr_latch: set/reset latch that holds a gate-drive signal (D1 or D2).
// The DPWM sets the output with a pulse on s and clears it with a pulse on r;
// both are asynchronous to the clock because r comes from a delay-line tap.
// The source design names the latch but not its priority: here reset wins
// when s and r are both high, which also makes a zero-length pulse come out
// as "off". rst_n (active low, asynchronous) forces the output low so the
// power switches start off. This latch is intentional: it is the storage
// element of the modulator, so the latch inferred from always_latch stands.
module sr_latch (
  input  logic rst_n,
  input  logic s,
  input  logic r,
  output logic q
);
  always_latch begin
    if (!rst_n || r) q = 1'b0;
    else if (s)      q = 1'b1;
  end
endmodule

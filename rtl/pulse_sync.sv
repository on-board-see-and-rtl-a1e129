// pulse_sync: carries a single-cycle pulse from one clock domain to another with a toggle
// flip-flop and a three-stage synchroniser; the output is a single-cycle pulse in the
// destination domain 2-3 cycles later. Pulses must be spaced by at least three destination
// cycles. A helper of this design, used for completion interrupts.
module pulse_sync (
  input  logic sclk,
  input  logic srst_n,
  input  logic spulse,
  input  logic dclk,
  input  logic drst_n,
  output logic dpulse
);
  logic tog;
  logic [2:0] sync;
  always_ff @(posedge sclk or negedge srst_n)
    if (!srst_n) tog <= 1'b0; else if (spulse) tog <= ~tog;
  always_ff @(posedge dclk or negedge drst_n)
    if (!drst_n) sync <= '0; else sync <= {sync[1:0], tog};
  assign dpulse = sync[2] ^ sync[1];
endmodule

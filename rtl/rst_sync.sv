// rst_sync: asynchronous-assert, synchronous-release reset for one clock domain
// (two flip-flops). A helper of this design.
module rst_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic [1:0] q;
  always_ff @(posedge clk or negedge arst_n)
    if (!arst_n) q <= '0; else q <= {q[0], 1'b1};
  assign rst_n = q[1];
endmodule

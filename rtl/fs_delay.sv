// fs_delay: shift-register delay line of DEPTH clock cycles on a W-bit
// word (DEPTH = 0 is a plain wire). The PED blocks use it to reach the
// pipeline depth of the reference design. All stages reset to zero, so a
// valid flag carried in the word starts cleared.
module fs_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_sr
    logic [W-1:0] sr [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < int'(DEPTH); k++) sr[k] <= '0;
      end else begin
        sr[0] <= d;
        for (int k = 1; k < int'(DEPTH); k++) sr[k] <= sr[k-1];
      end
    end
    assign q = sr[DEPTH-1];
  end
endmodule

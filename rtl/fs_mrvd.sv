// fs_mrvd: modified real-valued decomposition (M-RVD) of the complex MIMO
// model.
//
// Turns the complex channel H (MR x MT) and received vector y (MR) into the
// real-valued model with the real and imaginary parts of each complex entry
// on neighbouring rows and columns:
//   y_hat[2r]   = Re y_r            y_hat[2r+1] = Im y_r
//   H_hat[2r][2c]   =  Re h_rc      H_hat[2r][2c+1]   = -Im h_rc
//   H_hat[2r+1][2c] =  Im h_rc      H_hat[2r+1][2c+1] =  Re h_rc
// so the real symbol vector is (Re s_1, Im s_1, Re s_2, Im s_2, ...). After
// the QR decomposition the two top tree levels are the in-phase and
// quadrature parts of the same (last) complex symbol, which is what the
// detector's full expansion of two levels relies on, and a system with
// fewer streams ends earlier in the tree. The ordering follows the
// published detector; the QR decomposition itself is done elsewhere.
//
// Only a sign change is computed: -Im h saturates at the largest positive
// value (the one case, -(-2^15), that does not fit 16 bits). Timing: one
// register stage, a new matrix every cycle, outputs 1 cycle after inputs.
module fs_mrvd
  import fs_pkg::*;
#(
  parameter int unsigned MT = MT_MAX,   // transmit streams
  parameter int unsigned MR = MT_MAX    // receive antennas (MR >= MT)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  coef_t [MR-1:0][MT-1:0]        h_re,
  input  coef_t [MR-1:0][MT-1:0]        h_im,
  input  coef_t [MR-1:0]                y_re,
  input  coef_t [MR-1:0]                y_im,
  output coef_t [2*MR-1:0][2*MT-1:0]    h_hat,
  output coef_t [2*MR-1:0]              y_hat
);
  function automatic coef_t neg_sat(input coef_t v);
    return (v == coef_t'({1'b1, {(DW-1){1'b0}}})) ? coef_t'({1'b0, {(DW-1){1'b1}}}) : -v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_hat <= '0;
      y_hat <= '0;
    end else begin
      for (int r = 0; r < int'(MR); r++) begin
        y_hat[2*r]   <= y_re[r];
        y_hat[2*r+1] <= y_im[r];
        for (int c = 0; c < int'(MT); c++) begin
          h_hat[2*r][2*c]     <= h_re[r][c];
          h_hat[2*r][2*c+1]   <= neg_sat(h_im[r][c]);
          h_hat[2*r+1][2*c]   <= h_im[r][c];
          h_hat[2*r+1][2*c+1] <= h_re[r][c];
        end
      end
    end
  end

  initial assert (MR >= MT) else $error("fs_mrvd: needs MR >= MT");
endmodule

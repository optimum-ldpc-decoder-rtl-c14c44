// proc_unit: serial processing unit of the layered (TDMP) decoder.
//
// One row of H is decoded in two stages.  Read stage, one edge per cycle:
// the old outgoing message lambda_j is rebuilt from the compressed record
// (sign_j, and min2 if j is the stored index, else min1), the prior
// rho_j = gamma_j - lambda_j is formed, kept in a local buffer and fed to
// the Min-Sum kernel.  Writeback stage, one edge per cycle: for wb_idx the
// unit returns gamma_j = rho_j + Lambda_j, and rec_out is the new compressed
// record to write back to the extrinsic memory.  In the first iteration
// lam_zero makes every lambda_j zero, so the extrinsic memory needs no
// clearing.  Both sums saturate to +/-127.
//
// Timing: in_* and lam_rec are sampled at the clock edge; gamma_out and
// rec_out are combinational from the stored state.
module proc_unit
  import ldpc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            in_valid,
  input  logic [IDXW-1:0] in_idx,
  input  msg_t            gamma_in,
  input  lam_rec_t        lam_rec,
  input  logic            lam_zero,
  input  logic [IDXW-1:0] wb_idx,
  output msg_t            gamma_out,
  output lam_rec_t        rec_out
);

  msg_t rho_buf [CMAX];
  msg_t lam_old, rho, lam_new;
  mag_t old_mag;

  always_comb begin
    old_mag = (in_idx == lam_rec.idx) ? lam_rec.min2 : lam_rec.min1;
    if (lam_zero)                 lam_old = '0;
    else if (lam_rec.signs[in_idx]) lam_old = -msg_t'({1'b0, old_mag});
    else                          lam_old = msg_t'({1'b0, old_mag});
    rho = sat_msg((W+2)'(gamma_in) - (W+2)'(lam_old));
  end

  always_ff @(posedge clk)
    if (in_valid) rho_buf[in_idx] <= rho;

  siso_minsum u_siso (
    .clk, .rst_n, .clr, .in_valid, .in_idx, .rho,
    .q_idx(wb_idx), .lam_q(lam_new), .rec(rec_out)
  );

  assign gamma_out = sat_msg((W+2)'(rho_buf[wb_idx]) + (W+2)'(lam_new));

endmodule

// siso_minsum: serial Min-Sum soft-input soft-output kernel of one row.
//
// The prior messages rho_j of a row arrive one per cycle (in_valid, in_idx).
// The unit keeps the sign of every input, the product (XOR) of all signs,
// the smallest and second-smallest magnitude and the index of the smallest.
// The outgoing message for edge q is then
//   Lambda_q = (sign_q XOR sign product) * min(31, 3/4 * (q == idx ? min2 : min1)),
// available combinationally for any q once the last input has been taken.
// rec presents the same result in compressed form (signs of the outgoing
// messages, min1, min2, idx) for the extrinsic memory.  clr starts a new row.
//
// Normalized Min-Sum: the two minima are scaled by 3/4 (rounded down) and
// capped at 31 on the way out, and the record carries the scaled values.  Ties keep the first
// minimum.
module siso_minsum
  import ldpc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            in_valid,
  input  logic [IDXW-1:0] in_idx,
  input  msg_t            rho,
  input  logic [IDXW-1:0] q_idx,
  output msg_t            lam_q,
  output lam_rec_t        rec
);

  logic [CMAX-1:0] signs_q;
  logic            sprod_q;
  mag_t            min1_q, min2_q;
  logic [IDXW-1:0] idx_q;

  logic in_sign;
  mag_t in_mag;

  always_comb begin
    in_sign = rho[W-1];
    in_mag  = in_sign ? mag_t'(-rho) : mag_t'(rho);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      signs_q <= '0;
      sprod_q <= 1'b0;
      min1_q  <= '1;
      min2_q  <= '1;
      idx_q   <= '0;
    end else if (clr) begin
      signs_q <= '0;
      sprod_q <= 1'b0;
      min1_q  <= '1;
      min2_q  <= '1;
      idx_q   <= '0;
    end else if (in_valid) begin
      signs_q[in_idx] <= in_sign;
      sprod_q         <= sprod_q ^ in_sign;
      if (in_mag < min1_q) begin
        min2_q <= min1_q;
        min1_q <= in_mag;
        idx_q  <= in_idx;
      end else if (in_mag < min2_q) begin
        min2_q <= in_mag;
      end
    end
  end

  mag_t q_mag;
  always_comb begin
    q_mag = nms_scale((q_idx == idx_q) ? min2_q : min1_q);
    lam_q = (signs_q[q_idx] ^ sprod_q) ? -msg_t'({1'b0, q_mag}) : msg_t'({1'b0, q_mag});
    rec.signs = signs_q ^ {CMAX{sprod_q}};
    rec.min1  = nms_scale(min1_q);
    rec.min2  = nms_scale(min2_q);
    rec.idx   = idx_q;
  end

endmodule

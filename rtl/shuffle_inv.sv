// shuffle_inv: the inverse shuffling unit (pi^-1) between the processing
// units and the posterior memory.
//
// Unit p produced the new value of sample off+p of a block column.  Values
// of units 0..P-1-off go to positions off..P-1 of the lower word, the rest
// to positions 0..off-1 of the next word.  The unit builds both words with
// per-sample write masks and routes them to the banks that hold them:
// wr_lo / wr_hi select which of the two parts is written this cycle (both
// at once when they live in different banks, one per cycle otherwise).
// Combinational.
module shuffle_inv
  import ldpc_pkg::*;
#(
  parameter int P     = 3,
  parameter int NBANK = 2,
  localparam int BW   = (NBANK > 1) ? $clog2(NBANK) : 1,
  localparam int OW   = (P > 1) ? $clog2(P) : 1
) (
  input  msg_t [P-1:0]            vals,
  input  logic [OW-1:0]           off,
  input  logic [BW-1:0]           lo_bank,
  input  logic [BW-1:0]           hi_bank,
  input  logic                    wr_lo,
  input  logic                    wr_hi,
  output logic [NBANK-1:0]        we,
  output logic [NBANK-1:0][P-1:0] wmask,
  output msg_t [NBANK-1:0][P-1:0] wdata
);

  msg_t [P-1:0] lo_w, hi_w;
  logic [P-1:0] lo_m, hi_m;

  always_comb begin
    for (int i = 0; i < P; i++) begin
      if (i >= int'(off)) begin
        lo_w[i] = vals[i - int'(off)];
        lo_m[i] = 1'b1;
        hi_w[i] = '0;
        hi_m[i] = 1'b0;
      end else begin
        lo_w[i] = '0;
        lo_m[i] = 1'b0;
        hi_w[i] = vals[P - int'(off) + i];
        hi_m[i] = 1'b1;
      end
    end
    we    = '0;
    wmask = '0;
    wdata = '0;
    for (int b = 0; b < NBANK; b++) begin
      if (wr_lo && int'(lo_bank) == b) begin
        we[b] = 1'b1; wmask[b] = lo_m; wdata[b] = lo_w;
      end else if (wr_hi && int'(hi_bank) == b) begin
        we[b] = 1'b1; wmask[b] = hi_m; wdata[b] = hi_w;
      end
    end
  end

endmodule

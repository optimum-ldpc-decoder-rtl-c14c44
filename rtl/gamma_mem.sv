// gamma_mem: posterior message memory (one value per codeword symbol).
//
// The memory is split into NBANK banks, each a dual-port array with one read
// and one write port.  A word holds P consecutive samples of one block
// column (micro-organization), so the P rows processed together find their
// samples in at most two consecutive words.  Consecutive words of a block
// column alternate between banks (word w lives in bank w % NBANK at address
// col * WPC/NBANK + w / NBANK), so both words are normally fetched in the
// same cycle; a same-bank pair is the controller's business (it stalls).
// Writes carry a per-sample mask so a word can be updated in part.
//
// Reads are registered: data appears one cycle after re.  A read and a write
// to the same address in one cycle return the old data.
//
// The defaults give two banks of 384 x 24 bits, i.e. 2304 8-bit samples, the
// same capacity and bank count as the selected [192x48]x2 organization; the
// word here holds P = 3 samples instead of six.
module gamma_mem
  import ldpc_pkg::*;
#(
  parameter int P     = 3,
  parameter int NBANK = 2,
  parameter int DEPTH = NB * (ZMAX / P) / NBANK,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic [NBANK-1:0]     re,
  input  logic [NBANK-1:0][AW-1:0] raddr,
  output msg_t [NBANK-1:0][P-1:0]  rdata,
  input  logic [NBANK-1:0]     we,
  input  logic [NBANK-1:0][AW-1:0] waddr,
  input  logic [NBANK-1:0][P-1:0]  wmask,
  input  msg_t [NBANK-1:0][P-1:0]  wdata
);

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    msg_t [P-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (re[b]) rdata[b] <= mem[raddr[b]];
      if (we[b]) begin
        for (int s = 0; s < P; s++)
          if (wmask[b][s]) mem[waddr[b]][s] <= wdata[b][s];
      end
    end
  end

endmodule

// lambda_mem: extrinsic message memory bound to one processing unit.
//
// One entry per row handled by the unit holds the compressed Min-Sum output
// of that row (lam_rec_t: a sign per edge, first and second minimum and the
// index of the first minimum) instead of c_i full messages.  The address
// space is cut into NPART partitions of PDEPTH entries; only the partition
// addressed is enabled (part_en), so partitions a use case never reaches
// stay idle and could be powered off.  Defaults: 4 partitions of 96 entries,
// 384 rows per unit, enough for the 1152 rows of the largest code on three
// units.  Reads are registered (one cycle); the output holds its value until
// the next read.
//
// Own choice: an entry is one full record (RECW bits) rather than a 24-bit
// word, so rows of any degree up to CMAX fit in one access.
module lambda_mem
  import ldpc_pkg::*;
#(
  parameter int NPART  = 4,
  parameter int PDEPTH = 96,
  localparam int AW    = $clog2(NPART*PDEPTH)
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output lam_rec_t         rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  lam_rec_t         wdata,
  output logic [NPART-1:0] part_en
);

  lam_rec_t mem [NPART][PDEPTH];
  lam_rec_t rdata_q;
  int rpart, wpart;

  always_comb begin
    rpart = int'(raddr) / PDEPTH;
    wpart = int'(waddr) / PDEPTH;
    part_en = '0;
    if (re && rpart < NPART) part_en[rpart] = 1'b1;
    if (we && wpart < NPART) part_en[wpart] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (re && rpart < NPART) rdata_q <= mem[rpart][int'(raddr) % PDEPTH];
    if (we && wpart < NPART) mem[wpart][int'(waddr) % PDEPTH] <= wdata;
  end

  assign rdata = rdata_q;

endmodule

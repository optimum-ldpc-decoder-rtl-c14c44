// tb_shuffle_fwd: for every offset and bank order the forward shuffler must
// hand unit p sample off+p of the lower word followed by the next word; the
// same-bank case is exercised through the holding register (load_reg one
// cycle, use_reg the next), and the leftover path: the upper word of an edge
// kept from an earlier access must come back as the lower word (use_left).
module tb_shuffle_fwd;
  import ldpc_pkg::*;

  localparam int P = 3, NBANK = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  msg_t [NBANK-1:0][P-1:0] rdata;
  logic in_valid, use_reg, use_left, load_reg, out_valid;
  logic [IDXW-1:0] idx;
  logic [0:0] lo_bank, hi_bank;
  logic [1:0] off;
  msg_t [P-1:0] out;

  shuffle_fwd dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lo [P], hi [P];
  int left_m [CMAX][P];
  bit left_ok [CMAX];

  initial begin
    in_valid = 0; use_reg = 0; use_left = 0; idx = '0; load_reg = 0; lo_bank = 0; hi_bank = 1; off = 0; rdata = '0;
    for (int t = 0; t < 3000; t++) begin
      bit same, left;
      int o, k;
      same = (t % 3 == 0);
      o = $urandom_range(P - 1, 0);
      k = $urandom_range(CMAX - 1, 0);
      idx = IDXW'(k);
      left = !same && left_ok[k] && o != 0 && (t % 3 == 1);
      for (int s = 0; s < P; s++) begin lo[s] = $urandom_range(254, 0) - 127; hi[s] = $urandom_range(254, 0) - 127; end
      lo_bank = 1'($urandom_range(1, 0));
      if (same) begin
        // cycle 1: lower word arrives and is kept
        hi_bank = lo_bank;
        for (int s = 0; s < P; s++) begin rdata[lo_bank][s] = msg_t'(lo[s]); rdata[!lo_bank][s] = msg_t'(99); end
        load_reg = 1; use_reg = 0; in_valid = 0;
        @(negedge clk);
        load_reg = 0; use_reg = 1; in_valid = 1;
        for (int s = 0; s < P; s++) begin rdata[hi_bank][s] = msg_t'(hi[s]); rdata[!hi_bank][s] = msg_t'(-99); end
      end else begin
        hi_bank = !lo_bank; use_reg = 0; load_reg = 0; in_valid = 1;
        if (left) for (int s = 0; s < P; s++) lo[s] = left_m[k][s];
        for (int s = 0; s < P; s++) begin rdata[lo_bank][s] = left ? msg_t'(77) : msg_t'(lo[s]); rdata[hi_bank][s] = msg_t'(hi[s]); end
      end
      use_left = left;
      off = 2'(o);
      #1;
      checks++;
      if (!out_valid) failures++;
      for (int p = 0; p < P; p++) begin
        int e;
        e = (o + p < P) ? lo[o + p] : hi[o + p - P];
        checks++;
        if (int'(out[p]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d off %0d unit %0d: %0d expected %0d", t, o, p, out[p], e);
        end
      end
      if (o != 0) begin
        for (int s = 0; s < P; s++) left_m[k][s] = hi[s];
        left_ok[k] = 1;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

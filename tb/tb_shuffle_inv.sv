// tb_shuffle_inv: for every offset, bank order and write selection the
// inverse shuffler must put unit p's value at position off+p of the lower
// word (or off+p-P of the next word) with exactly those positions enabled,
// in the bank named for that word.
module tb_shuffle_inv;
  import ldpc_pkg::*;

  localparam int P = 3, NBANK = 2;

  msg_t [P-1:0] vals;
  logic [1:0] off;
  logic [0:0] lo_bank, hi_bank;
  logic wr_lo, wr_hi;
  logic [NBANK-1:0] we;
  logic [NBANK-1:0][P-1:0] wmask;
  msg_t [NBANK-1:0][P-1:0] wdata;

  shuffle_inv dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int o, lb, hb, sel;
      o = $urandom_range(P - 1, 0);
      lb = $urandom_range(1, 0);
      sel = $urandom_range(2, 0);            // 0: both, 1: lower only, 2: upper only
      hb = (sel == 0) ? 1 - lb : lb;
      for (int p = 0; p < P; p++) vals[p] = msg_t'($urandom_range(255, 0));
      off = 2'(o); lo_bank = 1'(lb); hi_bank = 1'(hb);
      wr_lo = (sel != 2); wr_hi = (sel != 1);
      #1;
      if (wr_lo) begin
        chk(we[lb], "lower bank enable");
        for (int i = 0; i < P; i++) begin
          chk(wmask[lb][i] == (i >= o), $sformatf("lower mask off %0d pos %0d", o, i));
          if (i >= o) chk(wdata[lb][i] == vals[i - o], $sformatf("lower data off %0d pos %0d", o, i));
        end
      end
      if (wr_hi) begin
        chk(we[hb], "upper bank enable");
        for (int i = 0; i < P; i++) begin
          chk(wmask[hb][i] == (i < o), $sformatf("upper mask off %0d pos %0d", o, i));
          if (i < o) chk(wdata[hb][i] == vals[P - o + i], $sformatf("upper data off %0d pos %0d", o, i));
        end
      end
      if (sel != 0) chk(!we[1 - lb], "other bank idle");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

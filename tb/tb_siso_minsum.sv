// tb_siso_minsum: random rows of degree 2..22 are fed to the Min-Sum kernel;
// every outgoing message and the compressed record are compared with a
// direct computation (sign product and minimum over the other edges, scaled
// by 3/4 and capped at 31).
module tb_siso_minsum;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            clr, in_valid;
  logic [IDXW-1:0] in_idx, q_idx;
  msg_t            rho, lam_q;
  lam_rec_t        rec;

  siso_minsum dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int v [CMAX];
  initial begin
    clr = 0; in_valid = 0; in_idx = '0; q_idx = '0; rho = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      int c;
      c = $urandom_range(CMAX, 2);
      @(negedge clk); clr = 1'b1;
      @(negedge clk); clr = 1'b0;
      for (int j = 0; j < c; j++) begin
        v[j] = $urandom_range(254, 0) - 127;
        if (t % 7 == 0) v[j] = (j % 2) ? 5 : -5;        // ties
        in_valid = 1'b1; in_idx = IDXW'(j); rho = msg_t'(v[j]);
        @(negedge clk);
      end
      in_valid = 1'b0;
      for (int j = 0; j < c; j++) begin
        int mn, sg, exp_l;
        mn = 1000;
        sg = 0;
        for (int k = 0; k < c; k++) if (k != j) begin
          int a;
          a = v[k] < 0 ? -v[k] : v[k];
          if (a < mn) mn = a;
          if (v[k] < 0) sg ^= 1;
        end
        mn = (mn * 3) / 4;
            if (mn > 31) mn = 31;
        exp_l = sg ? -mn : mn;
        q_idx = IDXW'(j);
        #1;
        checks++;
        if (int'(lam_q) != exp_l) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d edge %0d: %0d expected %0d", t, j, lam_q, exp_l);
        end
        // the record must rebuild the same message
        checks++;
        if (((rec.signs[j] ? -1 : 1) * int'((IDXW'(j) == rec.idx) ? rec.min2 : rec.min1)) != exp_l) begin
          failures++;
          if (failures < 10) $display("FAIL record row %0d edge %0d", t, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

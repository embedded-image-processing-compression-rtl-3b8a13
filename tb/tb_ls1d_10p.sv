// tb_ls1d_10p: checks one LS_1D stage against the direct-form 5/3 model.
// Lines of several lengths (including one-word lines) are sent with random gaps
// and also back to back; every output word is compared with the model, and the
// last word of a line must come out exactly two clocks after it went in.
module tb_ls1d_10p;
  import hsc_pkg::*;
  import hsc_ref_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_first = 0, in_last = 0;
  coef_t in_data [LANES];
  logic  out_valid, out_first, out_last;
  coef_t out_det [HALF], out_app [HALF];
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  ls1d_10p dut (.*);

  int exp_d[$], exp_s[$], exp_first[$], exp_last[$];
  longint cyc = 0, last_in_cyc[$];
  always @(posedge clk) cyc <= cyc + 1;

  // output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    for (int k = 0; k < HALF; k++) begin
      int ed, es;
      ed = exp_d.pop_front();
      es = exp_s.pop_front();
      checks++;
      if (int'(out_det[k]) != ed || int'(out_app[k]) != es) begin
        failures++;
        $display("mismatch lane %0d det %0d/%0d app %0d/%0d", k, out_det[k], ed, out_app[k], es);
      end
    end
    checks++;
    if (out_first != (exp_first.pop_front() != 0)) failures++;
    if (out_last) begin
      longint t;
      t = last_in_cyc.pop_front();
      checks++;
      if (cyc - t != 2) begin
        failures++;
        $display("last-word latency %0d", cyc - t);
      end
    end
    void'(exp_last.pop_front());
  end

  task automatic send_line(input int words, input bit gaps, input int lo, input int hi);
    int x[$], d[$], s[$];
    for (int i = 0; i < words * LANES; i++) x.push_back(lo + int'($urandom_range(hi - lo)));
    dwt53(x, d, s);
    for (int w = 0; w < words; w++) begin
      for (int k = 0; k < HALF; k++) begin
        exp_d.push_back(d[w*HALF+k]);
        exp_s.push_back(s[w*HALF+k]);
      end
      exp_first.push_back(w == 0);
      exp_last.push_back(w == words - 1);
    end
    for (int w = 0; w < words; w++) begin
      while (gaps && $urandom_range(2) == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_first = (w == 0);
      in_last  = (w == words - 1);
      for (int i = 0; i < LANES; i++) in_data[i] = coef_t'(x[w*LANES+i]);
      if (w == words - 1) last_in_cyc.push_back(cyc);
      @(negedge clk);
    end
  endtask

  initial begin
    for (int i = 0; i < LANES; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    send_line(6, 1, 0, 1023);
    send_line(4, 0, 0, 1023);      // back to back
    send_line(1, 0, 0, 1023);
    send_line(1, 0, -600, 2000);
    send_line(8, 1, -600, 2000);
    send_line(3, 0, 1023, 1023);
    for (int n = 0; n < 20; n++) send_line(1 + $urandom_range(7), $urandom_range(1), -1000, 1000);
    in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_d.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_d.size() / HALF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

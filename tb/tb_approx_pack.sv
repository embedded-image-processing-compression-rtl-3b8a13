// tb_approx_pack: random groups of 5 with random gaps; every output word must be
// the concatenation of two consecutive groups of a line, with the line flags.
module tb_approx_pack;
  import hsc_pkg::*;
  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_first = 0, in_last = 0;
  coef_t in_data [HALF];
  logic  out_valid, out_first, out_last;
  coef_t out_data [LANES];
  int    checks = 0, failures = 0;
  int    exp_q[$];          // expected coefficients
  int    exp_f[$], exp_l[$];

  always #5 clk = ~clk;
  approx_pack dut (.*);

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int i = 0; i < LANES; i++) begin
      checks++;
      if (int'(out_data[i]) != exp_q.pop_front()) failures++;
    end
    checks++;
    if (out_first != (exp_f.pop_front() != 0) || out_last != (exp_l.pop_front() != 0)) failures++;
  end

  initial begin
    for (int i = 0; i < HALF; i++) in_data[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ln = 0; ln < 30; ln++) begin
      int groups;
      groups = 2 * (1 + $urandom_range(5));
      for (int g = 0; g < groups; g++) begin
        while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_first = (g == 0);
        in_last  = (g == groups - 1);
        for (int i = 0; i < HALF; i++) begin
          in_data[i] = coef_t'($urandom);
          exp_q.push_back(int'(in_data[i]));
        end
        if (g % 2 == 1) begin
          exp_f.push_back(g == 1);
          exp_l.push_back(g == groups - 1);
        end
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dwt3_pyramid: random lines (80 and 160 pixels, and a ramp) through the three-
// level pyramid; each band output (D1, D2, D3, A3) is compared with the three-level
// 5/3 model of the whole line, group by group, including the line flags. Lines are
// sent both with gaps and back to back.
module tb_dwt3_pyramid;
  import hsc_pkg::*;
  import hsc_ref_pkg::*;
  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_first = 0, in_last = 0;
  pix_t  in_pix [LANES];
  logic  det_valid [3], det_first [3], det_last [3];
  coef_t det_data  [3][HALF];
  logic  app_valid, app_first, app_last;
  coef_t app_data  [HALF];
  int    checks = 0, failures = 0;
  int    exp_b [4][$];       // 0..2 detail levels, 3 approximation
  int    nlast [4];

  always #5 clk = ~clk;
  dwt3_pyramid dut (.*);

  task automatic chk(input int b, input coef_t v [HALF], input logic lst);
    for (int k = 0; k < HALF; k++) begin
      int e;
      e = exp_b[b].pop_front();
      checks++;
      if (int'(v[k]) != e) begin
        failures++;
        if (failures < 10) $display("band %0d: got %0d exp %0d", b, v[k], e);
      end
    end
    if (lst) nlast[b]++;
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < 3; l++) if (det_valid[l]) chk(l, det_data[l], det_last[l]);
    if (app_valid) chk(3, app_data, app_last);
  end

  task automatic send_line(input int words, input bit gaps, input bit ramp);
    int x[$], d1[$], d2[$], d3[$], s1[$], s2[$], s3[$];
    for (int i = 0; i < words * LANES; i++) x.push_back(ramp ? (i * 7) % 1024 : int'($urandom_range(1023)));
    dwt53(x, d1, s1);
    dwt53(s1, d2, s2);
    dwt53(s2, d3, s3);
    foreach (d1[i]) exp_b[0].push_back(d1[i]);
    foreach (d2[i]) exp_b[1].push_back(d2[i]);
    foreach (d3[i]) exp_b[2].push_back(d3[i]);
    foreach (s3[i]) exp_b[3].push_back(s3[i]);
    for (int w = 0; w < words; w++) begin
      while (gaps && $urandom_range(2) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      in_first = (w == 0);
      in_last  = (w == words - 1);
      for (int i = 0; i < LANES; i++) in_pix[i] = pix_t'(x[w*LANES+i]);
      @(negedge clk);
    end
  endtask

  initial begin
    for (int i = 0; i < LANES; i++) in_pix[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    send_line(8, 1, 0);
    send_line(8, 0, 1);
    send_line(16, 0, 0);
    send_line(4, 0, 0);
    for (int n = 0; n < 6; n++) send_line(4 * (1 + $urandom_range(3)), $urandom_range(1), 0);
    in_valid = 0;
    repeat (40) @(negedge clk);
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (exp_b[b].size() != 0 || nlast[b] != 10) begin
        failures++;
        $display("band %0d: %0d left, %0d line ends", b, exp_b[b].size(), nlast[b]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

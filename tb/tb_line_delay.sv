// tb_line_delay: random words with a random enable; the output must be the word
// written DEPTH enables earlier, and zero until DEPTH words have been written.
module tb_line_delay;
  localparam int W = 12, D = 5;
  logic         clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] din = '0, dout;
  int           checks = 0, failures = 0;
  int           hist[$];

  always #5 clk = ~clk;
  line_delay #(.W(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      en  = ($urandom_range(2) != 0);
      din = W'($urandom);
      #1;
      if (en) begin
        checks++;
        if (int'(dout) != ((hist.size() >= D) ? hist[hist.size() - D] : 0)) begin
          failures++;
          if (failures < 5) $display("n %0d: got %0d", n, dout);
        end
        hist.push_back(int'(din));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

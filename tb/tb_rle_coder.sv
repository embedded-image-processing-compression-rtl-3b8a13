// tb_rle_coder: lines of 80 coefficients (10 A3, 10 D3, 20 D2, 40 D1) with many small
// details are coded under a random output ready. The token stream is compared with
// a model coder token by token, and decoded back to check that it rebuilds the
// thresholded line. Runs, literals, approximations, a run closed by eol and a run
// held back by a literal are each counted and must all occur.
module tb_rle_coder;
  import hsc_pkg::*;
  import hsc_ref_pkg::*;
  localparam int LEN = 80, NLINE = 40;
  logic     clk = 0, rst_n = 0;
  coef_t    thr = 16'sd4;
  logic     in_valid = 0, in_ready, in_eol = 0;
  coef_t    in_coef = '0;
  band_e    in_band = BAND_A3;
  logic     out_valid, out_ready = 0;
  rle_tok_t out_tok;
  int       checks = 0, failures = 0;
  rle_tok_t exp_t[$];
  int       n_run = 0, n_lit = 0, n_app = 0, n_eolrun = 0;

  always #5 clk = ~clk;
  rle_coder dut (.*);

  function automatic band_e band_of(input int i);
    return (i < 10) ? BAND_A3 : (i < 20) ? BAND_D3 : (i < 40) ? BAND_D2 : BAND_D1;
  endfunction

  function automatic rle_tok_t mk(input rle_kind_e k, input bit eol, input int v);
    rle_tok_t t;
    t.kind  = k;
    t.eol   = eol;
    t.value = coef_t'(v);
    return t;
  endfunction

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    rle_tok_t e;
    e = exp_t.pop_front();
    checks++;
    if (out_tok != e) begin
      failures++;
      if (failures < 10) $display("token %p expected %p", out_tok, e);
    end
    case (out_tok.kind)
      RLE_RUN:    begin n_run++; if (out_tok.eol) n_eolrun++; end
      RLE_LIT:    n_lit++;
      RLE_APPROX: n_app++;
      default: ;
    endcase
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      for (int ln = 0; ln < NLINE; ln++) begin
        automatic int c[$];
        automatic int run = 0;
        for (int i = 0; i < LEN; i++)
          c.push_back((i < 10) ? int'($urandom_range(1000)) :
                      ($urandom_range(4) == 0) ? int'($urandom_range(40)) - 20 : int'($urandom_range(6)) - 3);
        if (ln % 3 == 0) c[LEN-1] = 50;     // line ending on a literal
        // model coder
        for (int i = 0; i < LEN; i++) begin
          automatic bit last = (i == LEN - 1);
          if (band_of(i) == BAND_A3 || iabs(c[i]) >= 4) begin
            if (run > 0) exp_t.push_back(mk(RLE_RUN, 0, run));
            run = 0;
            begin
              automatic rle_tok_t t;
              t.kind  = (band_of(i) == BAND_A3) ? RLE_APPROX : RLE_LIT;
              t.eol   = last;
              t.value = coef_t'(c[i]);
              exp_t.push_back(t);
            end
          end else begin
            run++;
            if (last) begin
              exp_t.push_back(mk(RLE_RUN, 1, run));
              run = 0;
            end
          end
        end
        for (int i = 0; i < LEN; i++) begin
          while ($urandom_range(5) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1;
          in_coef  = coef_t'(c[i]);
          in_band  = band_of(i);
          in_eol   = (i == LEN - 1);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
        end
        in_valid = 0;
      end
      forever begin
        out_ready = ($urandom_range(3) != 0);
        @(negedge clk);
      end
    join_any
    out_ready = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_t.size() != 0) begin failures++; $display("%0d tokens missing", exp_t.size()); end
    checks++;
    if (n_run == 0 || n_lit == 0 || n_app == 0 || n_eolrun == 0) failures++;
    $display("runs %0d (at eol %0d) literals %0d approximations %0d", n_run, n_eolrun, n_lit, n_app);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

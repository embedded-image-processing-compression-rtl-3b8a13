// hs_camera_tb_core: end-to-end test of hs_camera_top, shared by the reduced-size and
// the full-size testbench.
//
// Frames of a synthetic scene (textured background with flat patches, a bright belt
// whose right end moves from frame to frame, small bright textured markers) are sent
// at one word per clock within a line. Frame 0 is compressed with the run-length
// coder, frame 1 with the block coder (the mode is switched between frames, once the
// coefficient path is empty); before each line the test waits until the FIFO set it
// will write has been read, so nothing overflows. Frame 2 goes back to run-length
// mode; with OVF_FRAME set it is sent with no waiting and the coefficient FIFOs must
// overflow (its tokens are then not checked). The first frame's ROI is meaningless
// (the stream starts from black), so markers are found from frame 1 on.
// Everything the top emits is compared with models computed from the definitions:
// the three-level 5/3 wavelet line, threshold and run-length tokens, the 8x8
// quadtree tokens, the row run limits of the binarised image and the marker image.
// Each mechanism (runs, literals, every block-coder token kind, run limits, marker
// pixels, ROI moves, the mode switch, the overflow) is counted and must occur.
module hs_camera_tb_core #(
  parameter int LW        = 4,     // words per line
  parameter int ROWS      = 16,    // lines per frame, multiple of 8
  parameter bit OVF_FRAME = 1'b1,
  parameter int WATCHDOG  = 200000
);
  import hsc_pkg::*;
  import hsc_ref_pkg::*;
  localparam int N = LW * LANES;

  logic               clk = 0, rst_n = 0;
  logic               px_valid = 0, px_sof = 0, px_sol = 0, px_eol = 0;
  pix_t               px_data [LANES];
  logic               comp_mode = 0;
  coef_t              coef_thr = 16'sd6;
  pix_t               bin_thr = 10'd500;
  logic [SOBEL_W-1:0] edge_thr = 13'd200;
  logic [10:0]        roi_len = 11'd25, roi_y0 = 11'd1, roi_y1 = 11'(ROWS - 2);
  logic               rle_valid, rle_ready = 0, bc_valid, bc_ready = 0, coef_overflow;
  rle_tok_t           rle_tok;
  bc_tok_t            bc_tok;
  logic               run_valid, run_ready = 0, run_overflow, mk_valid;
  run_evt_t           run_evt;
  logic [LANES-1:0]   mk_bits;
  logic [10:0]        roi_x0, roi_x1;

  int checks = 0, failures = 0;
  bit done = 0;

  always #5 clk = ~clk;

  logic rel;   // a wavelet line has been read out of the coefficient FIFOs
  if (LW == IMG_W / LANES) begin : g_full
    hs_camera_top dut (.*);
    assign rel = dut.line_release;
  end else begin : g_reduced
    hs_camera_top #(.LINE_WORDS(LW)) dut (.*);
    assign rel = dut.line_release;
  end

  // ---------------- models ----------------
  int        f[$];                 // whole pixel stream
  bit        m[$];                 // merged image stream
  bit        exp_mk[$];
  rle_tok_t  exp_rle[$];
  bc_tok_t   exp_bc[$];
  run_evt_t  exp_run[$];
  int        roi0 = 0, roi1 = 0;
  bit        check_comp = 1;

  function automatic int fa(input int i);
    return (i < 0) ? 0 : f[i];
  endfunction
  function automatic int sob(input int i);
    int g1, g2;
    g1 = (fa(i) + 2*fa(i-1) + fa(i-2)) - (fa(i-2*N) + 2*fa(i-2*N-1) + fa(i-2*N-2));
    g2 = (fa(i) + 2*fa(i-N) + fa(i-2*N)) - (fa(i-2) + 2*fa(i-N-2) + fa(i-2*N-2));
    return iabs(g1) + iabs(g2);
  endfunction
  function automatic bit ero(input int i);
    for (int dy = 0; dy < 3; dy++)
      for (int dx = 0; dx < 3; dx++) begin
        int k;
        k = i - dx - dy*N;
        if (k < 0 || !m[k]) return 0;
      end
    return 1;
  endfunction
  function automatic rle_tok_t rt(input rle_kind_e k, input bit e, input int v);
    rle_tok_t t;
    t.kind = k; t.eol = e; t.value = coef_t'(v);
    return t;
  endfunction
  function automatic bc_tok_t bt(input bc_kind_e k, input int v);
    bc_tok_t t;
    t.kind = k; t.value = coef_t'(v);
    return t;
  endfunction
  function automatic run_evt_t re(input bit e, input int x, input int y);
    run_evt_t r;
    r.is_end = e; r.x = 11'(x); r.y = 11'(y);
    return r;
  endfunction

  function automatic void rle_model(input int w[$]);
    int run;
    run = 0;
    for (int i = 0; i < N; i++) begin
      bit app, last;
      app  = (i < N / 8);
      last = (i == N - 1);
      if (app || iabs(w[i]) >= int'(coef_thr)) begin
        if (run > 0) exp_rle.push_back(rt(RLE_RUN, 0, run));
        run = 0;
        exp_rle.push_back(rt(app ? RLE_APPROX : RLE_LIT, last, w[i]));
      end else begin
        run++;
        if (last) exp_rle.push_back(rt(RLE_RUN, 1, run));
      end
    end
  endfunction

  int band [8][$];
  function automatic bit uni(input int r0, input int c0, input int sz);
    for (int r = r0; r < r0 + sz; r++)
      for (int c = c0; c < c0 + sz; c++)
        if (band[r][c] != band[r0][c0]) return 0;
    return 1;
  endfunction
  function automatic void bc_model();
    for (int b = 0; b < N; b += 8) begin
      if (uni(0, b, 8)) exp_bc.push_back(bt(BC_U8, band[0][b]));
      else
        for (int q = 0; q < 4; q++) begin
          int r4, c4;
          r4 = (q / 2) * 4; c4 = b + (q % 2) * 4;
          if (uni(r4, c4, 4)) exp_bc.push_back(bt(BC_U4, band[r4][c4]));
          else
            for (int s = 0; s < 4; s++) begin
              int r2, c2;
              r2 = r4 + (s / 2) * 2; c2 = c4 + (s % 2) * 2;
              if (uni(r2, c2, 2)) exp_bc.push_back(bt(BC_U2, band[r2][c2]));
              else for (int p = 0; p < 4; p++) exp_bc.push_back(bt(BC_RAW, band[r2 + p/2][c2 + p%2]));
            end
        end
    end
  endfunction

  // ---------------- output checkers and counters ----------------
  int n_run = 0, n_lit = 0, n_app = 0, n_bc [4], n_start = 0, n_end = 0, n_mk = 0;
  int n_roi_moves = 0, mk_words = 0, released = 0;
  logic [10:0] last_x1 = '0;

  always @(posedge clk) if (rst_n) begin
    if (rle_valid && rle_ready) begin
      if (check_comp) begin
        checks++;
        if (exp_rle.size() == 0 || rle_tok != exp_rle[0]) begin
          failures++;
          if (failures < 10) $display("rle token %p expected %p", rle_tok, exp_rle.size() ? exp_rle[0] : '0);
        end
        if (exp_rle.size() != 0) void'(exp_rle.pop_front());
      end
      case (rle_tok.kind)
        RLE_RUN: n_run++;
        RLE_LIT: n_lit++;
        default: n_app++;
      endcase
    end
    if (bc_valid && bc_ready) begin
      checks++;
      if (exp_bc.size() == 0 || bc_tok != exp_bc[0]) begin
        failures++;
        if (failures < 10) $display("bc token %p expected %p", bc_tok, exp_bc.size() ? exp_bc[0] : '0);
      end
      if (exp_bc.size() != 0) void'(exp_bc.pop_front());
      n_bc[bc_tok.kind]++;
    end
    if (run_valid && run_ready) begin
      checks++;
      if (exp_run.size() == 0 || run_evt != exp_run[0]) begin
        failures++;
        if (failures < 10) $display("run event %p expected %p", run_evt, exp_run.size() ? exp_run[0] : '0);
      end
      if (exp_run.size() != 0) void'(exp_run.pop_front());
      if (run_evt.is_end) n_end++; else n_start++;
    end
    if (mk_valid) begin
      for (int j = 0; j < LANES; j++) begin
        checks++;
        if (mk_bits[j] != exp_mk[mk_words*LANES + j]) failures++;
        if (mk_bits[j]) n_mk++;
      end
      mk_words++;
    end
    if (roi_x1 != last_x1) n_roi_moves++;
    last_x1 <= roi_x1;
    if (rel) released++;
  end

  // ---------------- scene ----------------
  function automatic int scene(input int fr, input int x, input int y);
    if (y >= ROWS - 5 && x < N / 2 + 6 * fr) return 1000;                   // belt
    if ((y >= 2 && y < 7 && x >= 8 + 3*fr && x < 13 + 3*fr) ||
        (y >= 4 && y < 9 && x >= N / 2 + 2 && x < N / 2 + 7))                // markers
      return 600 + int'($urandom_range(423));
    if ((x / 8 + y / 8) % 2 == 0) return 120;                                // flat patch
    return 118 + int'($urandom_range(4));                                  // low-noise patch
  endfunction

  task automatic send_frame(input int fr, input bit wait_path);
    int right, found, sent;
    found = 0; right = 0;
    for (int y = 0; y < ROWS; y++) begin
      int row[$], w[$];
      bit prev;
      sent = fr * ROWS + y;
      if (wait_path) while (released < sent - 1) @(negedge clk);
      prev = 0;
      for (int x = 0; x < N; x++) begin
        int v, i;
        bit e, t;
        v = scene(fr, x, y);
        row.push_back(v);
        f.push_back(v);
        i = f.size() - 1;
        e = (sob(i) > int'(edge_thr));
        t = (v >= int'(bin_thr));
        if (e) begin found = 1; if (x > right) right = x; end
        m.push_back(e && t && x >= roi0 && x <= roi1 && y >= int'(roi_y0) && y <= int'(roi_y1));
        exp_mk.push_back(ero(i));
        if (t && !prev) exp_run.push_back(re(0, x, y));
        if (!t && prev) exp_run.push_back(re(1, x - 1, y));
        prev = t;
      end
      if (prev) exp_run.push_back(re(1, N - 1, y));
      dwt_line(row, w);
      if (!comp_mode) rle_model(w);
      else begin
        for (int i = 0; i < N; i++) band[y % 8].push_back((iabs(w[i]) < int'(coef_thr)) ? 0 : w[i]);
        if (y % 8 == 7) begin
          bc_model();
          for (int r = 0; r < 8; r++) band[r] = {};
        end
      end
      for (int wd = 0; wd < LW; wd++) begin
        px_valid = 1;
        px_sof   = (y == 0 && wd == 0);
        px_sol   = (wd == 0);
        px_eol   = (wd == LW - 1);
        for (int j = 0; j < LANES; j++) px_data[j] = pix_t'(row[wd*LANES + j]);
        @(negedge clk);
      end
      px_valid = 0;
    end
    if (found) begin roi1 = right; roi0 = (right > int'(roi_len)) ? right - int'(roi_len) : 0; end
  endtask

  task automatic drain();
    while (released < f.size() / N || exp_rle.size() != 0 || exp_bc.size() != 0) @(negedge clk);
    repeat (20) @(negedge clk);
  endtask

  initial begin
    for (int j = 0; j < LANES; j++) px_data[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      forever begin
        rle_ready = ($urandom_range(7) != 0);
        bc_ready  = ($urandom_range(7) != 0);
        run_ready = ($urandom_range(3) != 0);
        @(negedge clk);
      end
      begin
        comp_mode = 0;
        send_frame(0, 1);
        drain();
        comp_mode = 1;                      // mode switch between frames
        send_frame(1, 1);
        drain();
        comp_mode = 0;
        if (OVF_FRAME) begin
          check_comp = 0;
          send_frame(2, 0);
          repeat (N * 4) @(negedge clk);
        end else begin
          send_frame(2, 1);
          drain();
        end
        done = 1;
      end
    join_any
    wait (done);
    repeat (N * 2) @(negedge clk);
    checks++;
    if (exp_run.size() != 0 || run_overflow) begin failures++; $display("run events left %0d", exp_run.size()); end
    checks++;
    if (mk_words * LANES != exp_mk.size()) begin failures++; $display("marker words %0d", mk_words); end
    checks++;
    if (coef_overflow != OVF_FRAME) begin failures++; $display("coefficient overflow %0d", coef_overflow); end
    checks++;
    if (n_run == 0 || n_lit == 0 || n_app == 0) failures++;
    checks++;
    if (n_bc[BC_U8] == 0 || n_bc[BC_RAW] == 0 || n_bc[BC_U4] + n_bc[BC_U2] == 0) failures++;
    checks++;
    if (n_start == 0 || n_end == 0 || n_mk == 0 || n_roi_moves < 2) failures++;
    $display("rle: runs %0d literals %0d approx %0d | bc: U8 %0d U4 %0d U2 %0d RAW %0d",
             n_run, n_lit, n_app, n_bc[0], n_bc[1], n_bc[2], n_bc[3]);
    $display("run starts %0d ends %0d | marker pixels %0d | roi moves %0d | overflow %0d",
             n_start, n_end, n_mk, n_roi_moves, coef_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

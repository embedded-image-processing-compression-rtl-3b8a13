// coef_serializer: sends complete wavelet lines from the FIFO bank one coefficient
// per clock.
//
// When the bank reports a complete line, the line is read band by band in the order
// A3, D3, D2, D1, which is the layout of one line of the 1D wavelet image (low
// frequencies on the left). Each FIFO group of 5 is sent as 5 coefficients, lane 0
// first. Lines alternate between the even and odd FIFO sets. out_valid/out_ready is
// a plain valid-ready handshake; out_band tags the band and out_eol the last
// coefficient of the line. After the last coefficient the line is released.
module coef_serializer
  import hsc_pkg::*;
#(
  parameter int unsigned LINE_WORDS = IMG_W / LANES
) (
  input  logic  clk,
  input  logic  rst_n,
  // bank
  output band_e rd_band,
  output logic  rd_parity,
  output logic  rd_en,
  input  coef_t rd_data [HALF],
  output logic  line_release,
  input  logic  [1:0] lines_ready,
  // stream
  output logic  out_valid,
  input  logic  out_ready,
  output coef_t out_coef,
  output band_e out_band,
  output logic  out_eol
);
  localparam int unsigned WCW = $clog2(LINE_WORDS + 1);
  logic           active;
  logic [2:0]     lane;
  logic [WCW-1:0] word;
  logic [WCW-1:0] words_in_band;
  logic           fire, band_end;

  always_comb begin
    unique case (rd_band)
      BAND_A3, BAND_D3: words_in_band = WCW'(LINE_WORDS / 4);
      BAND_D2:          words_in_band = WCW'(LINE_WORDS / 2);
      default:          words_in_band = WCW'(LINE_WORDS);
    endcase
  end

  assign out_valid    = active;
  assign out_coef     = rd_data[lane];
  assign out_band     = rd_band;
  assign fire         = out_valid && out_ready;
  assign band_end     = (lane == 3'(HALF - 1)) && (word == words_in_band - 1'b1);
  assign out_eol      = band_end && (rd_band == BAND_D1);
  assign rd_en        = fire && (lane == 3'(HALF - 1));
  assign line_release = fire && out_eol;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      lane      <= '0;
      word      <= '0;
      rd_band   <= BAND_A3;
      rd_parity <= 1'b0;
    end else if (!active) begin
      if (lines_ready != 0) begin
        active  <= 1'b1;
        lane    <= '0;
        word    <= '0;
        rd_band <= BAND_A3;
      end
    end else if (fire) begin
      if (lane != 3'(HALF - 1)) begin
        lane <= lane + 1'b1;
      end else begin
        lane <= '0;
        if (!band_end) begin
          word <= word + 1'b1;
        end else begin
          word <= '0;
          if (rd_band == BAND_D1) begin
            active    <= 1'b0;
            rd_parity <= !rd_parity;
          end else begin
            rd_band <= band_e'(rd_band + 1'b1);
          end
        end
      end
    end
  end
endmodule

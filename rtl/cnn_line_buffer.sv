// cnn_line_buffer: turns a row-major stream of input features into KxK windows. Two line
// memories of LINE_W words each (2 x 244 = 488 words by default) hold the two previous
// image lines; a 3x3 register window shifts one column per accepted pixel, its new column
// being {line 0, line 1, new pixel} at the current column. After the shift the window's
// bottom-right tap is the new pixel, so for a kernel edge ksize (1..3, set at run time)
// the window is complete, and is offered on win_valid, once the pixel's row and column
// are both at least ksize-1 (a "valid" convolution, stride 1). Row and column counters
// wrap at cfg_width; 'clear' restarts them at the top-left of a new feature map.
// Handshake: a pixel is taken when pix_valid and pix_ready; pix_ready is high while no
// window is waiting, so a window stays unchanged until win_ready takes it.
// Following the document: two lines of 244 features are buffered for 3x3 convolutions.
// The window registers and the counter scheme are this design's choice.
module cnn_line_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned LINE_W = LINE_W_DEF,
  localparam int unsigned XW = $clog2(LINE_W + 1),
  localparam int unsigned CW = $clog2(LINE_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,      // start of a new feature map
  input  logic [XW-1:0]     cfg_width,  // pixels per line, 1..LINE_W
  input  logic [1:0]        cfg_ksize,  // kernel edge, 1..3
  input  logic              pix_valid,
  output logic              pix_ready,
  input  logic [DATA_W-1:0] pix_data,
  output logic              win_valid,
  input  logic              win_ready,
  output window_t           win
);
  logic [DATA_W-1:0] line0 [LINE_W];   // line r-2
  logic [DATA_W-1:0] line1 [LINE_W];   // line r-1
  logic [CW-1:0]     col;
  logic [15:0]       row;
  logic              take;
  logic              row_ok, col_ok;

  assign pix_ready = !win_valid || win_ready;
  assign take      = pix_valid && pix_ready;
  assign row_ok    = row >= 16'(cfg_ksize - 2'd1);
  assign col_ok    = col >= CW'(cfg_ksize - 2'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row <= '0; win_valid <= 1'b0; win <= '0;
    end else if (clear) begin
      col <= '0; row <= '0; win_valid <= 1'b0;
    end else begin
      if (win_valid && win_ready) win_valid <= 1'b0;
      if (take) begin
        for (int r = 0; r < KMAX; r++)
          for (int c = 0; c < KMAX - 1; c++)
            win[r][c] <= win[r][c+1];
        win[0][KMAX-1] <= line0[col];
        win[1][KMAX-1] <= line1[col];
        win[2][KMAX-1] <= pix_data;
        win_valid      <= row_ok && col_ok;
        if (XW'(col) == cfg_width - 1'b1) begin
          col <= '0;
          row <= row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take && !clear) begin
      line0[col] <= line1[col];
      line1[col] <= pix_data;
    end
  end
endmodule

// integral_unit: computes the integral image on the fly while the frame
// is streamed in.
//
// Pixels arrive in raster order, one 8-bit grey value per accepted cycle.
// For pixel (x, y) the unit forms
//   I(x,y) = i(x,y) + I(x-1,y) + I(x,y-1) - I(x-1,y-1)
// with I = 0 outside the frame. Only two lines of integral values are
// kept: the line being produced (current line buffer) and the one before
// it (previous line buffer). I(x-1,y) and I(x-1,y-1) are held in
// registers, so each pixel needs one read of the previous line and one
// write of the current line. At the end of a line the two buffers swap
// roles. Each integral value leaves on a write port (linear address
// y*IMG_W + x, data) one cycle after its pixel, ready for the scrambled
// write into the distributed memory. Streaming in the pixels instead of
// integral words cuts the transfer from 27 to 8 bits per pixel.
//
// `start` begins a frame at (0,0); pix_ready is high while a frame is
// being loaded; `loaded` rises after the last pixel's word is written
// and stays high until the next start. The formula and the two line
// buffers follow the published scheme; the handshake and the ping-pong
// swap of the buffers are this design's choices.
module integral_unit
  import tld_pkg::*;
#(
  parameter int unsigned IMG_W  = TLD_IMG_W,
  parameter int unsigned IMG_H  = TLD_IMG_H,
  parameter int unsigned DATA_W = TLD_PIX_W,
  localparam int unsigned ADDR_W = $clog2(IMG_W * IMG_H),
  localparam int unsigned X_W    = $clog2(IMG_W),
  localparam int unsigned Y_W    = $clog2(IMG_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              pix_valid,
  output logic              pix_ready,
  input  logic [7:0]        pix,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] wr_data,
  output logic              loaded
);

  logic [DATA_W-1:0] line_buf [2][IMG_W];
  logic              cur;            // index of the current line buffer
  logic [X_W-1:0]    x;
  logic [Y_W-1:0]    y;
  logic [ADDR_W-1:0] addr;
  logic              active;
  logic [DATA_W-1:0] left_q, upleft_q;
  logic [DATA_W-1:0] up, left, upleft, ival;
  logic              take, last_x, last_y;

  assign pix_ready = active;
  assign take      = active && pix_valid;
  assign last_x    = (x == X_W'(IMG_W - 1));
  assign last_y    = (y == Y_W'(IMG_H - 1));

  always_comb begin
    up     = (y == '0) ? '0 : line_buf[!cur][x];
    left   = (x == '0) ? '0 : left_q;
    upleft = (x == '0 || y == '0) ? '0 : upleft_q;
    ival   = DATA_W'(pix) + left + up - upleft;
  end

  always_ff @(posedge clk) begin
    if (take) line_buf[cur][x] <= ival;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      loaded   <= 1'b0;
      cur      <= 1'b0;
      x        <= '0;
      y        <= '0;
      addr     <= '0;
      left_q   <= '0;
      upleft_q <= '0;
      wr_en    <= 1'b0;
      wr_addr  <= '0;
      wr_data  <= '0;
    end else begin
      wr_en <= take;
      if (start) begin
        active <= 1'b1;
        loaded <= 1'b0;
        cur    <= 1'b0;
        x      <= '0;
        y      <= '0;
        addr   <= '0;
      end else if (take) begin
        wr_addr  <= addr;
        wr_data  <= ival;
        left_q   <= ival;
        upleft_q <= up;
        addr     <= addr + 1'b1;
        if (!last_x) x <= x + 1'b1;
        else begin
          x   <= '0;
          cur <= !cur;
          if (!last_y) y <= y + 1'b1;
          else active <= 1'b0;
        end
      end
      if (!active && !start && wr_en) loaded <= 1'b1;
    end
  end

endmodule

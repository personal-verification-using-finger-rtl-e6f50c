// window_fetch: sliding K x K window pixel buffer with image border checking.
//
// For every pixel (x,y) of an img_w x img_h image stored at src_base, in
// raster order, this block presents the K x K neighbourhood centred on it
// (R = K/2 pixels each side) to a filter, together with a tag holding the
// destination address dst_base + y*img_w + x and a 'last' flag.
//
// How it works: the window is a bank of registers, K rows of K pixels. At
// the start of every row all K columns are read from the image buffer; for
// each further pixel the window shifts one column left and only the new
// right-hand column (K pixels) is read. Reads outside the image are clamped
// to the nearest edge pixel (border checking by replication). The buffer has
// a one-cycle read latency, so a column costs K read cycles plus two cycles
// to land and shift in; a pass takes about img_w*img_h*(K+3) + img_h*K*(K+2)
// cycles.
//
// The register window and the border check are named by the design; the
// column-wise refill and the replicate-padding rule are this block's choices.
//
// Interface: 'start' (one cycle, while idle) begins a pass and raises busy.
// win_valid pulses for one cycle per output pixel with win (row-major, index
// r*K+c, centre at K*K/2) and win_tag. busy drops after the last window.
// There is no backpressure: the filter must take every window. Starting a
// pass while busy is a protocol error (asserted).
module window_fetch
  import vein_pkg::*;
#(
  parameter int K       = 7,
  parameter int ADDR_W  = 18,
  parameter int COORD_W = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [ADDR_W-1:0]     src_base,
  input  logic [ADDR_W-1:0]     dst_base,
  input  logic [COORD_W-1:0]    img_w,
  input  logic [COORD_W-1:0]    img_h,
  output logic [ADDR_W-1:0]     raddr,
  input  logic [7:0]            rdata,
  output logic [K*K-1:0][7:0]   win,
  output logic                  win_valid,
  output tag_t                  win_tag,
  output logic                  busy
);

  localparam int R  = K / 2;
  localparam int CW = COORD_W + 2;   // signed coordinate width

  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_WAIT, S_COMMIT, S_EMIT} state_t;
  state_t state;

  logic [COORD_W-1:0]     x, y;
  logic [$clog2(K+1)-1:0] rc;        // row of the column being read
  logic [$clog2(K+1)-1:0] cc;        // columns still to read before emitting
  logic [K-1:0][7:0]      colbuf;    // column being assembled
  logic                   rd_pend;   // a read issued last cycle
  logic [$clog2(K+1)-1:0] rd_row;    // its row slot
  logic [ADDR_W-1:0]      out_addr;

  // Coordinates of the pixel being read, clamped into the image.
  logic signed [CW-1:0] col_s, row_s;
  logic [COORD_W-1:0]   col_c, row_c;

  always_comb begin
    // cc counts down: the column read is x + R - (cc - 1).
    col_s = CW'($signed({2'b00, x})) + CW'(R) - CW'($signed({1'b0, cc})) + CW'(1);
    row_s = CW'($signed({2'b00, y})) - CW'(R) + CW'($signed({1'b0, rc}));
    if (col_s < 0)                                  col_c = '0;
    else if (col_s > CW'($signed({2'b00, img_w})) - CW'(1)) col_c = img_w - 1'b1;
    else                                            col_c = col_s[COORD_W-1:0];
    if (row_s < 0)                                  row_c = '0;
    else if (row_s > CW'($signed({2'b00, img_h})) - CW'(1)) row_c = img_h - 1'b1;
    else                                            row_c = row_s[COORD_W-1:0];
    raddr = src_base + ADDR_W'(row_c) * ADDR_W'(img_w) + ADDR_W'(col_c);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      x         <= '0;
      y         <= '0;
      rc        <= '0;
      cc        <= '0;
      rd_pend   <= 1'b0;
      rd_row    <= '0;
      out_addr  <= '0;
      win_valid <= 1'b0;
      win_tag   <= '0;
      win       <= '0;
      colbuf    <= '0;
    end else begin
      win_valid <= 1'b0;
      rd_pend   <= 1'b0;
      if (rd_pend) colbuf[rd_row] <= rdata;
      unique case (state)
        S_IDLE: if (start) begin
          x        <= '0;
          y        <= '0;
          rc       <= '0;
          cc       <= ($clog2(K+1))'(K);
          out_addr <= dst_base;
          state    <= S_ISSUE;
        end
        S_ISSUE: begin
          rd_pend <= 1'b1;
          rd_row  <= rc;
          if (rc == ($clog2(K+1))'(K-1)) begin
            rc    <= '0;
            state <= S_WAIT;
          end else begin
            rc <= rc + 1'b1;
          end
        end
        S_WAIT: state <= S_COMMIT;
        S_COMMIT: begin
          for (int r = 0; r < K; r++) begin
            for (int c = 0; c < K-1; c++) win[r*K+c] <= win[r*K+c+1];
            win[r*K+K-1] <= colbuf[r];
          end
          cc    <= cc - 1'b1;
          state <= (cc == 1) ? S_EMIT : S_ISSUE;
        end
        S_EMIT: begin
          win_valid     <= 1'b1;
          win_tag.addr  <= out_addr;
          win_tag.last  <= (x == img_w - 1'b1) && (y == img_h - 1'b1);
          out_addr      <= out_addr + 1'b1;
          if (x == img_w - 1'b1) begin
            if (y == img_h - 1'b1) begin
              state <= S_IDLE;
            end else begin
              x     <= '0;
              y     <= y + 1'b1;
              cc    <= ($clog2(K+1))'(K);
              state <= S_ISSUE;
            end
          end else begin
            x     <= x + 1'b1;
            cc    <= ($clog2(K+1))'(1);
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // A pass may only be started while the previous one has finished.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("window_fetch started while busy");

endmodule

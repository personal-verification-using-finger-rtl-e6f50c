// region_fill: finger region filling and ROI masking.
//
// The finger lies across the image, so after edge detection and dilation each
// image column holds the upper and the lower finger boundary. For every
// column x this block first scans the edge map top to bottom and records the
// first and the last edge pixel (any non-zero value). It then scans the
// column again and writes, for every row y, the grey pixel of the
// median-filtered image if y lies between those two rows (inclusive) and 0
// otherwise; a column without any edge pixel becomes all 0. The result is the
// grey finger region (region of interest) on a black background. Filling the
// finger region is named by the design; the column-wise rule and the
// masking of the grey image are this implementation's.
//
// Interface: 'start' begins; the block drives the image buffer's read port
// (one-cycle read latency) and write port, and busy drops when done. About
// 2*img_w*img_h + 2*img_w cycles.
module region_fill #(
  parameter int ADDR_W  = 18,
  parameter int COORD_W = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [ADDR_W-1:0]  edge_base,
  input  logic [ADDR_W-1:0]  gray_base,
  input  logic [ADDR_W-1:0]  dst_base,
  input  logic [COORD_W-1:0] img_w,
  input  logic [COORD_W-1:0] img_h,
  output logic [ADDR_W-1:0]  raddr,
  input  logic [7:0]         rdata,
  output logic               we,
  output logic [ADDR_W-1:0]  waddr,
  output logic [7:0]         wdata,
  output logic               busy
);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_FILL, S_NEXT} state_t;
  state_t state;

  logic [COORD_W-1:0] x, y;
  logic [ADDR_W-1:0]  off;          // y*img_w + x of the pixel being read
  logic               pend;         // a read issued last cycle
  logic [COORD_W-1:0] py;           // its row
  logic [ADDR_W-1:0]  poff;         // its offset
  logic               pscan;        // it was an edge-map read
  logic               found;
  logic [COORD_W-1:0] top, bot;

  always_comb raddr = ((state == S_SCAN) ? edge_base : gray_base) + off;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      x     <= '0;
      y     <= '0;
      off   <= '0;
      pend  <= 1'b0;
      py    <= '0;
      poff  <= '0;
      pscan <= 1'b0;
      found <= 1'b0;
      top   <= '0;
      bot   <= '0;
      we    <= 1'b0;
      waddr <= '0;
      wdata <= '0;
    end else begin
      we   <= 1'b0;
      pend <= 1'b0;
      // Result of the read issued in the previous cycle.
      if (pend && pscan && rdata != 8'd0) begin
        if (!found) top <= py;
        found <= 1'b1;
        bot   <= py;
      end
      if (pend && !pscan) begin
        we    <= 1'b1;
        waddr <= dst_base + poff;
        wdata <= (found && py >= top && py <= bot) ? rdata : 8'd0;
      end
      unique case (state)
        S_IDLE: if (start) begin
          x     <= '0;
          y     <= '0;
          off   <= '0;
          found <= 1'b0;
          state <= S_SCAN;
        end
        S_SCAN, S_FILL: begin
          pend  <= 1'b1;
          pscan <= (state == S_SCAN);
          py    <= y;
          poff  <= off;
          if (y == img_h - 1'b1) begin
            y     <= '0;
            off   <= ADDR_W'(x);
            state <= S_NEXT;
          end else begin
            y   <= y + 1'b1;
            off <= off + ADDR_W'(img_w);
          end
        end
        S_NEXT: begin
          // Wait one cycle for the last read of the scan to land.
          if (pscan) begin
            state <= S_FILL;
          end else if (x == img_w - 1'b1) begin
            state <= S_IDLE;
          end else begin
            x     <= x + 1'b1;
            off   <= ADDR_W'(x) + 1'b1;
            found <= 1'b0;
            state <= S_SCAN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) || pend || we;

endmodule

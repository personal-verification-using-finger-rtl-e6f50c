// vein_preproc_core: image preprocessing accelerator for finger-vein
// verification.
//
// A grey finger image (up to 1023 x 1023, 320 x 240 in the reference set-up)
// is streamed into the shared image buffer, the core turns it into a thin
// binary vein skeleton, and the host reads the result back for minutiae
// extraction and matching in software. The chain of passes is
//   1. 7x7 grey median filter                       (gray_median)
//   2. Canny gradient, non-maximum suppression and
//      hysteresis classification on 9x9 windows     (canny_nms)
//   3. edge tracking, repeated until stable, then
//      removal of the remaining weak edges           (edge_track)
//   4. 3x3 dilation of the finger outline           (dilate)
//   5. finger region filling and masking, giving the
//      grey region of interest                      (region_fill)
//   6. 5x5 Gaussian low-pass filter                 (gauss5)
//   7. 19x19 local thresholding                     (local_thresh)
//   8. 5x5 binary median, three times               (bin_median)
//   9. Zhang-Suen thinning, until stable            (thinning)
// Steps 2-5 form the ROI extraction. Every window pass is a window_fetch
// (sliding register window with border clamping) feeding one filter whose
// output is written back to the buffer at the tag address. The design's
// image alignment and resizing step between ROI extraction and the Gaussian
// filter is not part of this core.
//
// The core can also run one preprocessing module on its own (run_one with
// op_sel: median, ROI extraction, Gaussian, threshold, binary median x3 or
// thinning), the way each module is timed separately in the design.
//
// Buffer regions: an image of N = img_w*img_h pixels is loaded at address 0
// and the first result is stored right after it, at N, as in the design.
// Further passes alternate between the regions. Region filling also needs
// the grey image, which is kept in its own region, so the full chain and the
// ROI module use a third region at 2N and need 3N <= 2^ADDR_W (N <= 87381);
// every other single module needs only 2N <= 2^ADDR_W (N <= 131072, the
// design's limit). The region rotation and the sequencer are this
// implementation's.
//
// Interface (all synchronous to clk, active-low synchronous reset):
//   load:    pulse load_start, then give the N pixels in raster order with
//            in_valid/in_pix (one per cycle at most). Only while idle.
//   run:     pulse start with run_one = 0 for the whole chain, or run_one = 1
//            and op_sel for one module; busy stays high until it finishes
//            and done pulses for one cycle. t_high/t_low are the Canny
//            thresholds. Loading, starting and reading while busy is a
//            protocol error (asserted).
//   read:    pulse rd_start with rd_sel (0 = final result, 1 = the grey image
//            kept for region filling: the median-filtered image after the
//            chain, the loaded image after the ROI module); every cycle with rd_step high fetches the next
//            pixel, which appears on out_pix with out_valid one cycle later.
//   stat_*:  pass counters of the last run.
module vein_preproc_core
  import vein_pkg::*;
#(
  parameter int ADDR_W   = 18,
  parameter int COORD_W  = 10,
  parameter int MAX_ITER = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] img_w,
  input  logic [COORD_W-1:0] img_h,
  input  logic [7:0]         t_high,
  input  logic [7:0]         t_low,
  input  logic               load_start,
  input  logic               in_valid,
  input  logic [7:0]         in_pix,
  input  logic               start,
  input  logic               run_one,
  input  op_t                op_sel,
  output logic               done,
  output logic               busy,
  input  logic               rd_start,
  input  logic               rd_sel,
  input  logic               rd_step,
  output logic               out_valid,
  output logic [7:0]         out_pix,
  output logic [31:0]        stat_pass,
  output logic [7:0]         stat_track_iter,
  output logic [7:0]         stat_thin_iter
);

  typedef enum logic [3:0] {
    P_MEDIAN, P_CANNY, P_TRACK, P_TRACK_FIN, P_DILATE, P_FILL,
    P_GAUSS, P_THRESH, P_BMED, P_THIN0, P_THIN1
  } pass_t;

  typedef enum logic [1:0] {C_IDLE, C_LAUNCH, C_RUN} cstate_t;

  // ---------------------------------------------------------------- buffer
  logic              ram_we;
  logic [ADDR_W-1:0] ram_waddr, ram_raddr;
  logic [7:0]        ram_wdata, ram_rdata;

  image_ram #(.ADDR_W(ADDR_W), .DATA_W(8)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr(ram_raddr), .rdata(ram_rdata));

  // ------------------------------------------------------------ sequencer
  cstate_t           cst;
  pass_t             pass;
  logic [1:0]        cur, oth;            // regions holding / receiving data
  logic [1:0]        med_r;               // region kept for region filling
  logic              single;              // running one module only
  logic [ADDR_W-1:0] npix;
  logic [ADDR_W-1:0] src_base, dst_base, base_cur, base_oth, base_med;
  logic [7:0]        iter;
  logic [1:0]        bmed_n;
  logic              chg, chg_prev;       // a pixel changed in this / last pass
  logic              launch;
  logic              pass_end;

  function automatic logic [ADDR_W-1:0] region_base(input logic [1:0] r,
                                                    input logic [ADDR_W-1:0] n);
    return (r == 2'd0) ? '0 : (r == 2'd1) ? n : ADDR_W'(n << 1);
  endfunction

  always_comb begin
    base_cur = region_base(cur, npix);
    base_oth = region_base(oth, npix);
    base_med = region_base(med_r, npix);
    src_base = base_cur;
    dst_base = base_oth;
  end

  // -------------------------------------------------------- window engines
  logic launch7, launch9, launch3, launch5, launch19, launch_fill;
  assign launch7     = launch && (pass == P_MEDIAN);
  assign launch9     = launch && (pass == P_CANNY);
  assign launch3     = launch && (pass inside {P_TRACK, P_TRACK_FIN, P_DILATE, P_THIN0, P_THIN1});
  assign launch5     = launch && (pass inside {P_GAUSS, P_BMED});
  assign launch19    = launch && (pass == P_THRESH);
  assign launch_fill = launch && (pass == P_FILL);

  logic [ADDR_W-1:0] ra7, ra9, ra3, ra5, ra19, ra_fill;
  logic [48:0][7:0]  w7;
  logic [80:0][7:0]  w9;
  logic [8:0][7:0]   w3;
  logic [24:0][7:0]  w5;
  logic [360:0][7:0] w19;
  logic              v7, v9, v3, v5, v19;
  tag_t              t7, t9, t3, t5, t19;
  logic              b7, b9, b3, b5, b19;

  window_fetch #(.K(7), .ADDR_W(ADDR_W), .COORD_W(COORD_W)) u_wf7 (
    .clk, .rst_n, .start(launch7), .src_base, .dst_base, .img_w, .img_h,
    .raddr(ra7), .rdata(ram_rdata), .win(w7), .win_valid(v7), .win_tag(t7), .busy(b7));
  window_fetch #(.K(9), .ADDR_W(ADDR_W), .COORD_W(COORD_W)) u_wf9 (
    .clk, .rst_n, .start(launch9), .src_base, .dst_base, .img_w, .img_h,
    .raddr(ra9), .rdata(ram_rdata), .win(w9), .win_valid(v9), .win_tag(t9), .busy(b9));
  window_fetch #(.K(3), .ADDR_W(ADDR_W), .COORD_W(COORD_W)) u_wf3 (
    .clk, .rst_n, .start(launch3), .src_base, .dst_base, .img_w, .img_h,
    .raddr(ra3), .rdata(ram_rdata), .win(w3), .win_valid(v3), .win_tag(t3), .busy(b3));
  window_fetch #(.K(5), .ADDR_W(ADDR_W), .COORD_W(COORD_W)) u_wf5 (
    .clk, .rst_n, .start(launch5), .src_base, .dst_base, .img_w, .img_h,
    .raddr(ra5), .rdata(ram_rdata), .win(w5), .win_valid(v5), .win_tag(t5), .busy(b5));
  window_fetch #(.K(19), .ADDR_W(ADDR_W), .COORD_W(COORD_W)) u_wf19 (
    .clk, .rst_n, .start(launch19), .src_base, .dst_base, .img_w, .img_h,
    .raddr(ra19), .rdata(ram_rdata), .win(w19), .win_valid(v19), .win_tag(t19), .busy(b19));

  // --------------------------------------------------------------- filters
  logic       kv_med, kv_can, kv_trk, kv_dil, kv_gau, kv_thr, kv_bmd, kv_thn;
  tag_t       kt_med, kt_can, kt_trk, kt_dil, kt_gau, kt_thr, kt_bmd, kt_thn;
  logic [7:0] kp_med, kp_can, kp_trk, kp_dil, kp_gau, kp_thr, kp_bmd, kp_thn;
  logic       kc_trk, kc_thn;

  gray_median #(.N(49)) u_med (
    .clk, .rst_n, .in_valid(v7), .in_tag(t7), .win(w7),
    .out_valid(kv_med), .out_tag(kt_med), .out_pix(kp_med));
  canny_nms u_canny (
    .clk, .rst_n, .in_valid(v9), .in_tag(t9), .win(w9), .t_high, .t_low,
    .out_valid(kv_can), .out_tag(kt_can), .out_pix(kp_can));
  edge_track u_track (
    .clk, .rst_n, .in_valid(v3), .in_tag(t3), .win(w3), .finalize(pass == P_TRACK_FIN),
    .out_valid(kv_trk), .out_tag(kt_trk), .out_pix(kp_trk), .out_changed(kc_trk));
  dilate u_dil (
    .clk, .rst_n, .in_valid(v3), .in_tag(t3), .win(w3),
    .out_valid(kv_dil), .out_tag(kt_dil), .out_pix(kp_dil));
  gauss5 u_gauss (
    .clk, .rst_n, .in_valid(v5), .in_tag(t5), .win(w5),
    .out_valid(kv_gau), .out_tag(kt_gau), .out_pix(kp_gau));
  local_thresh #(.K(19)) u_thr (
    .clk, .rst_n, .in_valid(v19), .in_tag(t19), .win(w19),
    .out_valid(kv_thr), .out_tag(kt_thr), .out_pix(kp_thr));
  bin_median #(.K(5)) u_bmed (
    .clk, .rst_n, .in_valid(v5), .in_tag(t5), .win(w5),
    .out_valid(kv_bmd), .out_tag(kt_bmd), .out_pix(kp_bmd));
  thinning u_thin (
    .clk, .rst_n, .in_valid(v3), .in_tag(t3), .win(w3), .sub(pass == P_THIN1),
    .out_valid(kv_thn), .out_tag(kt_thn), .out_pix(kp_thn), .out_changed(kc_thn));

  logic              fill_we, fill_busy;
  logic [ADDR_W-1:0] fill_waddr;
  logic [7:0]        fill_wdata;

  region_fill #(.ADDR_W(ADDR_W), .COORD_W(COORD_W)) u_fill (
    .clk, .rst_n, .start(launch_fill), .edge_base(base_cur), .gray_base(base_med),
    .dst_base(base_oth), .img_w, .img_h, .raddr(ra_fill), .rdata(ram_rdata),
    .we(fill_we), .waddr(fill_waddr), .wdata(fill_wdata), .busy(fill_busy));

  // Output of the filter used by the current pass.
  logic       k_valid, k_changed;
  tag_t       k_tag;
  logic [7:0] k_pix;
  logic [ADDR_W-1:0] k_raddr;

  always_comb begin
    k_changed = 1'b0;
    unique case (pass)
      P_MEDIAN:            begin k_valid = kv_med; k_tag = kt_med; k_pix = kp_med; k_raddr = ra7; end
      P_CANNY:             begin k_valid = kv_can; k_tag = kt_can; k_pix = kp_can; k_raddr = ra9; end
      P_TRACK, P_TRACK_FIN: begin k_valid = kv_trk; k_tag = kt_trk; k_pix = kp_trk; k_raddr = ra3;
                                 k_changed = kc_trk; end
      P_DILATE:            begin k_valid = kv_dil; k_tag = kt_dil; k_pix = kp_dil; k_raddr = ra3; end
      P_FILL:              begin k_valid = fill_we; k_tag = '{addr: fill_waddr, last: 1'b0};
                                 k_pix = fill_wdata; k_raddr = ra_fill; end
      P_GAUSS:             begin k_valid = kv_gau; k_tag = kt_gau; k_pix = kp_gau; k_raddr = ra5; end
      P_THRESH:            begin k_valid = kv_thr; k_tag = kt_thr; k_pix = kp_thr; k_raddr = ra19; end
      P_BMED:              begin k_valid = kv_bmd; k_tag = kt_bmd; k_pix = kp_bmd; k_raddr = ra5; end
      default:             begin k_valid = kv_thn; k_tag = kt_thn; k_pix = kp_thn; k_raddr = ra3;
                                 k_changed = kc_thn; end
    endcase
    pass_end = (pass == P_FILL) ? !fill_busy : (k_valid && k_tag.last);
  end

  // ------------------------------------------------- load and read-out ports
  logic              ld_busy, ld_last;
  logic [ADDR_W-1:0] ld_addr;
  logic [COORD_W-1:0] ld_x, ld_y, rd_x, rd_y;
  logic              rd_busy, rd_last, rd_fire;
  logic [ADDR_W-1:0] rd_addr;

  pixel_addr_gen #(.ADDR_W(ADDR_W), .COORD_W(COORD_W)) u_ld (
    .clk, .rst_n, .start(load_start && !busy), .step(in_valid), .base('0), .img_w, .img_h,
    .addr(ld_addr), .x(ld_x), .y(ld_y), .last(ld_last), .busy(ld_busy));

  pixel_addr_gen #(.ADDR_W(ADDR_W), .COORD_W(COORD_W)) u_rd (
    .clk, .rst_n, .start(rd_start && !busy), .step(rd_step), .base(rd_sel ? base_med : base_cur),
    .img_w, .img_h, .addr(rd_addr), .x(rd_x), .y(rd_y), .last(rd_last), .busy(rd_busy));

  assign rd_fire = rd_busy && rd_step && !busy;

  always_comb begin
    if (busy) begin
      ram_raddr = k_raddr;
      ram_we    = k_valid;
      ram_waddr = k_tag.addr;
      ram_wdata = k_pix;
    end else begin
      ram_raddr = rd_addr;
      ram_we    = ld_busy && in_valid;
      ram_waddr = ld_addr;
      ram_wdata = in_pix;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= rd_fire;
  end
  assign out_pix = ram_rdata;

  // ------------------------------------------------------------ sequencing
  // After a pass has written region 'oth', that region becomes 'cur'. The
  // next destination is the old 'cur', unless it holds the grey image that
  // region filling still needs (med_r); then it is the third region.
  logic [1:0] next_oth;
  logic       grp_end;     // the pass just finished ends the selected module
  logic       any_chg;

  assign busy     = (cst != C_IDLE);
  assign launch   = (cst == C_LAUNCH);
  assign any_chg  = chg || (k_valid && k_changed);
  assign next_oth = (cur == med_r) ? 2'(3 - int'(oth) - int'(med_r)) : cur;

  always_comb begin
    unique case (pass)
      P_MEDIAN: grp_end = single;
      P_FILL:   grp_end = single;
      P_GAUSS:  grp_end = single;
      P_THRESH: grp_end = single;
      P_BMED:   grp_end = single && (bmed_n == 2'd2);
      default:  grp_end = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cst             <= C_IDLE;
      pass            <= P_MEDIAN;
      single          <= 1'b0;
      cur             <= 2'd0;
      oth             <= 2'd1;
      med_r           <= 2'd1;
      npix            <= '0;
      iter            <= '0;
      bmed_n          <= '0;
      chg             <= 1'b0;
      chg_prev        <= 1'b0;
      done            <= 1'b0;
      stat_pass       <= '0;
      stat_track_iter <= '0;
      stat_thin_iter  <= '0;
    end else begin
      done <= 1'b0;
      unique case (cst)
        C_IDLE: if (start) begin
          npix            <= ADDR_W'(img_w) * ADDR_W'(img_h);
          single          <= run_one;
          cur             <= 2'd0;
          oth             <= 2'd1;
          iter            <= '0;
          bmed_n          <= '0;
          stat_pass       <= '0;
          stat_track_iter <= '0;
          stat_thin_iter  <= '0;
          cst             <= C_LAUNCH;
          // Full chain: the median result (region 1) is kept for filling.
          // ROI extraction alone: the loaded image (region 0) is the grey
          // image. Other single modules: nothing is kept (3 = none).
          med_r           <= !run_one ? 2'd1 : (op_sel == OP_ROI) ? 2'd0 : 2'd3;
          if (!run_one) pass <= P_MEDIAN;
          else begin
            unique case (op_sel)
              OP_MEDIAN: pass <= P_MEDIAN;
              OP_ROI:    pass <= P_CANNY;
              OP_GAUSS:  pass <= P_GAUSS;
              OP_THRESH: pass <= P_THRESH;
              OP_BMED:   pass <= P_BMED;
              default:   pass <= P_THIN0;
            endcase
          end
        end
        C_LAUNCH: begin
          chg <= 1'b0;
          cst <= C_RUN;
        end
        C_RUN: begin
          if (k_valid && k_changed) chg <= 1'b1;
          if (pass_end) begin
            stat_pass <= stat_pass + 1'b1;
            cst       <= C_LAUNCH;
            cur       <= oth;
            oth       <= next_oth;
            unique case (pass)
              P_MEDIAN: pass <= P_CANNY;
              P_CANNY:  begin pass <= P_TRACK; iter <= '0; end
              P_TRACK: begin
                iter <= iter + 1'b1;
                stat_track_iter <= stat_track_iter + 1'b1;
                if (!any_chg || iter + 1 >= 8'(MAX_ITER)) pass <= P_TRACK_FIN;
              end
              P_TRACK_FIN: pass <= P_DILATE;
              P_DILATE:    pass <= P_FILL;
              P_FILL:      pass <= P_GAUSS;
              P_GAUSS:     pass <= P_THRESH;
              P_THRESH:    begin pass <= P_BMED; bmed_n <= '0; end
              P_BMED: begin
                bmed_n <= bmed_n + 1'b1;
                if (bmed_n == 2'd2) begin
                  pass <= P_THIN0;
                  iter <= '0;
                end
              end
              P_THIN0: begin
                pass <= P_THIN1;
                chg_prev <= any_chg;
                stat_thin_iter <= stat_thin_iter + 1'b1;
              end
              default: begin  // P_THIN1
                iter <= iter + 1'b1;
                stat_thin_iter <= stat_thin_iter + 1'b1;
                if ((any_chg || chg_prev) && iter + 1 < 8'(MAX_ITER)) begin
                  pass <= P_THIN0;
                end else begin
                  cst  <= C_IDLE;
                  done <= 1'b1;
                end
              end
            endcase
            if (grp_end) begin
              cst  <= C_IDLE;
              done <= 1'b1;
            end
          end
        end
        default: cst <= C_IDLE;
      endcase
    end
  end

  // Host protocol rules.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !(load_start || in_valid))
    else $error("image loaded while the core is busy");
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !rd_start)
    else $error("read-out started while the core is busy");

endmodule

// gray_median: pipelined grey-level median filter (7x7 by default).
//
// The N window pixels go through a sorting network built from Batcher's
// odd-even mergesort: compare-exchange units, each putting the larger of its
// two inputs on the higher index, arranged in stages. For N = 49 the network
// has 21 stages and 394 compare-exchange units, of which the 319 that feed the
// middle output (index N/2) remain after synthesis; the median is that middle
// output. The design's 7x7 window and the odd-even mergesort come from the
// design; its printed comparator count (342) is for a pruning it does not
// spell out, so the exact network here is this implementation's.
//
// The stage structure follows the iterative form of the mergesort: for
// p = 1, 2, 4 ... and k = p, p/2 ... 1, units join i+j and i+j+k when both lie
// in the same block of 2p. Every stage ends in a pipeline register.
//
// Interface: one window per cycle may enter (in_valid, in_tag, win). The
// median leaves LOG*(LOG+1)/2 cycles later (21 for N = 49) with the same tag.
module gray_median
  import vein_pkg::*;
#(
  parameter int N = 49
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  tag_t              in_tag,
  input  logic [N-1:0][7:0] win,
  output logic              out_valid,
  output tag_t              out_tag,
  output logic [7:0]        out_pix
);

  localparam int LOG = $clog2(N);
  localparam int NST = LOG * (LOG + 1) / 2;

  logic [N-1:0][7:0] stg [NST+1];
  logic [NST:0]      vld;
  tag_t              tg  [NST+1];

  assign stg[0] = win;
  assign vld[0] = in_valid;
  assign tg[0]  = in_tag;

  for (genvar pe = 0; pe < LOG; pe++) begin : g_p
    for (genvar kk = 0; kk <= pe; kk++) begin : g_k
      localparam int P  = 1 << pe;
      localparam int KD = 1 << (pe - kk);
      localparam int S  = pe * (pe + 1) / 2 + kk;

      logic [N-1:0][7:0] nxt;

      always_comb begin
        nxt = stg[S];
        for (int j = KD % P; j <= N - 1 - KD; j += 2 * KD) begin
          for (int i = 0; i < KD; i++) begin
            if ((i <= N - j - KD - 1) && (((i + j) / (2 * P)) == ((i + j + KD) / (2 * P)))) begin
              if (stg[S][i+j] > stg[S][i+j+KD]) begin
                nxt[i+j]    = stg[S][i+j+KD];
                nxt[i+j+KD] = stg[S][i+j];
              end
            end
          end
        end
      end

      always_ff @(posedge clk) begin
        if (!rst_n) begin
          vld[S+1] <= 1'b0;
        end else begin
          vld[S+1] <= vld[S];
        end
        stg[S+1] <= nxt;
        tg[S+1]  <= tg[S];
      end
    end
  end

  assign out_valid = vld[NST];
  assign out_tag   = tg[NST];
  assign out_pix   = stg[NST][N/2];

endmodule

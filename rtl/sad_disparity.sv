// sad_disparity: area-based stereo disparity search with SAD windows.
//
// For every pixel (x, y) of the left image the unit compares the WIN x WIN
// window around it (7x7) with the windows around (x+v, y) in the right
// image for v = 0..NDISP-1 (32) and reports the v with the smallest sum of
// absolute differences (SAD). The images must be rectified, so matches lie
// on the same line. Pixels outside the image count as zero.
//
// Reuse of earlier results. With M = (WIN-1)/2 and the row SAD
//   R_y(x, v) = sum over i = -M..M of |L(x+i, y) - Rt(x+v+i, y)|
// the window total obeys Total_y(x, v) = Total_{y-1}(x, v) - R_{y-M-1}(x, v)
// + R_{y+M}(x, v). A lookup table with one total per column and disparity
// (IMG_W x NDISP entries) holds the previous line's totals, so each new
// window costs two row SADs instead of WIN.
//
// Schedule. Pixel pairs arrive in raster order (sof on the first). The last
// WIN+1 lines of both images sit in line buffers (WIN+1 = 8 lines). After a
// line r has arrived, one pass updates the table from line r (entering)
// and line r-WIN (leaving) and yields the results of line y = r-M. A pass
// is NDISP sweeps, one per disparity, of IMG_W+2M clock steps. Each step
// reads one pixel of each image from each of the two lines, forms two
// absolute differences, and keeps the last WIN differences of each line in
// a shift register; an adder tree of depth ceil(log2 WIN) (3 for 7x7) sums
// them into a row SAD, and the table entry of that column is updated. So
// the unit needs WIN difference registers per line and one comparison per
// clock; a 352x288 frame takes 288*352 + (288+3)*32*358 = 3,435,072 clocks,
// 68.7 ms or 14.6 frames/s at 50 MHz. Three passes after the last line
// (with zero lines entering) finish the bottom rows.
//
// Confidence. Per column the two lowest totals and their disparities are
// kept. A result is flagged thr_ok when the lowest total lies within
// [thr_low, thr_high] (too low means a flat, noise-matched area, too high
// means no good match), and sbd_ok when the best and second-best
// disparities are at most sbd_thr apart.
//
// Interface: in_req/in_data/in_ack (pair_t); thresholds (stable during a
// frame); results in raster order on out_req/out_ack with out_disp,
// out_sad, out_thr_ok, out_sbd_ok; frame_done pulses after the last
// result. Following the described algorithm: 7x7 window, 32 disparities,
// the line-to-line table update, the two confidence tests. This design's
// own choices: zero padding at the borders, disparity measured toward
// increasing x in the right image (as in the SAD formula), ties go to the
// smaller disparity, the table and line buffers are on chip, and each
// comparison completes within a single clock.
module sad_disparity
  import m6_pkg::*;
#(
  parameter int IMG_W = 352,
  parameter int IMG_H = 288,
  parameter int WIN   = 7,
  parameter int NDISP = 32,
  parameter int SAD_W = $clog2(WIN * WIN * 255 + 1),
  parameter int DW    = $clog2(NDISP)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_req,
  input  pair_t            in_data,
  output logic             in_ack,
  input  logic [SAD_W-1:0] thr_low,
  input  logic [SAD_W-1:0] thr_high,
  input  logic [DW-1:0]    sbd_thr,
  output logic             out_req,
  input  logic             out_ack,
  output logic [DW-1:0]    out_disp,
  output logic [SAD_W-1:0] out_sad,
  output logic             out_thr_ok,
  output logic             out_sbd_ok,
  output logic             frame_done
);

  localparam int M      = (WIN - 1) / 2;
  localparam int SLOTS  = WIN + 1;
  localparam int STEPS  = IMG_W + 2 * M;
  localparam int LEV    = $clog2(WIN);
  localparam int NP     = 1 << LEV;
  localparam int XW     = $clog2(IMG_W + 1);
  localparam int SW     = $clog2(STEPS + 1);
  localparam int RW     = $clog2(IMG_H + M + 1);
  localparam int SLW    = $clog2(SLOTS);
  localparam int VW     = $clog2(NDISP + 1);

  typedef enum logic [1:0] {S_IDLE, S_RECV, S_PROC} state_e;

  // line buffers and tables
  logic [PIX_W-1:0] lbl [SLOTS][IMG_W];
  logic [PIX_W-1:0] lbr [SLOTS][IMG_W];
  logic [SAD_W-1:0] lut [IMG_W * NDISP];
  logic [SAD_W-1:0] best_sad [IMG_W];
  logic [SAD_W-1:0] sec_sad  [IMG_W];
  logic [DW-1:0]    best_d   [IMG_W];
  logic [DW-1:0]    sec_d    [IMG_W];

  state_e           state;
  logic [RW-1:0]    r;
  logic [XW-1:0]    rx;
  logic [VW-1:0]    v;
  logic [SW-1:0]    s;
  logic [SLW-1:0]   slot_new, slot_old;
  logic [PIX_W-1:0] sh_new [WIN-1];
  logic [PIX_W-1:0] sh_old [WIN-1];

  // ---------------- one comparison step ----------------
  logic signed [XW+1:0] p, q;
  logic                 new_ok, old_ok, p_in, q_in;
  logic [PIX_W-1:0]     ln, rn, lo, ro, ad_new, ad_old;
  logic [SAD_W-1:0]     tree_new [LEV+1][NP];
  logic [SAD_W-1:0]     tree_old [LEV+1][NP];
  logic [SAD_W-1:0]     row_new, row_old;
  logic                 x_ok, last_v, emit, stall, adv;
  logic [XW-1:0]        x;
  logic [SAD_W+1:0]     total_w;
  logic [SAD_W-1:0]     total, prev;
  logic [SAD_W-1:0]     nb_sad, ns_sad;
  logic [DW-1:0]        nb_d, ns_d;

  assign p      = $signed({2'b00, s}) - (XW+2)'(M);
  assign q      = p + $signed({{(XW+2-VW){1'b0}}, v});
  assign p_in   = (p >= 0) && (p < (XW+2)'(IMG_W));
  assign q_in   = (q >= 0) && (q < (XW+2)'(IMG_W));
  assign new_ok = 32'(r) < IMG_H;
  assign old_ok = 32'(r) >= WIN;

  always_comb begin
    ln = (new_ok && p_in) ? lbl[slot_new][p[XW-1:0]] : '0;
    rn = (new_ok && q_in) ? lbr[slot_new][q[XW-1:0]] : '0;
    lo = (old_ok && p_in) ? lbl[slot_old][p[XW-1:0]] : '0;
    ro = (old_ok && q_in) ? lbr[slot_old][q[XW-1:0]] : '0;
    ad_new = (ln > rn) ? ln - rn : rn - ln;
    ad_old = (lo > ro) ? lo - ro : ro - lo;
  end

  // adder trees over the last WIN differences of each line
  always_comb begin
    for (int i = 0; i < NP; i++) begin
      if (i == 0)          begin tree_new[0][i] = SAD_W'(ad_new);      tree_old[0][i] = SAD_W'(ad_old);      end
      else if (i < WIN)    begin tree_new[0][i] = SAD_W'(sh_new[i-1]); tree_old[0][i] = SAD_W'(sh_old[i-1]); end
      else                 begin tree_new[0][i] = '0;                  tree_old[0][i] = '0;                  end
    end
    for (int l = 1; l <= LEV; l++) begin
      for (int i = 0; i < NP; i++) begin
        if (i < (NP >> l)) begin
          tree_new[l][i] = tree_new[l-1][2*i] + tree_new[l-1][2*i+1];
          tree_old[l][i] = tree_old[l-1][2*i] + tree_old[l-1][2*i+1];
        end else begin
          tree_new[l][i] = '0;
          tree_old[l][i] = '0;
        end
      end
    end
    row_new = tree_new[LEV][0];
    row_old = tree_old[LEV][0];
  end

  assign x_ok    = 32'(s) >= 2 * M;
  assign x       = XW'(32'(s) - 2 * M);
  assign last_v  = 32'(v) == NDISP - 1;
  assign prev    = (r == '0) ? '0 : lut[32'(x) * NDISP + 32'(v)];
  assign total_w = {2'b00, prev} + {2'b00, row_new} - {2'b00, row_old};
  assign total   = total_w[SAD_W-1:0];

  always_comb begin
    nb_sad = best_sad[x];
    nb_d   = best_d[x];
    ns_sad = sec_sad[x];
    ns_d   = sec_d[x];
    if (v == '0) begin
      nb_sad = total;
      nb_d   = '0;
      ns_sad = '1;
      ns_d   = '0;
    end else if (total < best_sad[x]) begin
      ns_sad = best_sad[x];
      ns_d   = best_d[x];
      nb_sad = total;
      nb_d   = DW'(v);
    end else if (total < sec_sad[x]) begin
      ns_sad = total;
      ns_d   = DW'(v);
    end
  end

  assign emit  = (state == S_PROC) && x_ok && last_v && (32'(r) >= M);
  assign stall = emit && out_req && !out_ack;
  assign adv   = (state == S_PROC) && !stall;

  // ---------------- input ----------------
  assign in_ack = (state == S_IDLE) || (state == S_RECV);

  always_ff @(posedge clk) begin
    if (in_req && in_ack) begin
      if (state == S_IDLE) begin
        lbl[0][0] <= in_data.left;
        lbr[0][0] <= in_data.right;
      end else begin
        lbl[slot_new][rx] <= in_data.left;
        lbr[slot_new][rx] <= in_data.right;
      end
    end
    if (adv) begin
      sh_new[0] <= ad_new;
      sh_old[0] <= ad_old;
      for (int i = 1; i < WIN - 1; i++) begin
        sh_new[i] <= sh_new[i-1];
        sh_old[i] <= sh_old[i-1];
      end
      if (x_ok) begin
        lut[32'(x) * NDISP + 32'(v)] <= total;
        best_sad[x] <= nb_sad;
        best_d[x]   <= nb_d;
        sec_sad[x]  <= ns_sad;
        sec_d[x]    <= ns_d;
      end
    end
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      r          <= '0;
      rx         <= '0;
      v          <= '0;
      s          <= '0;
      slot_new   <= '0;
      slot_old   <= SLW'(1);
      out_req    <= 1'b0;
      out_disp   <= '0;
      out_sad    <= '0;
      out_thr_ok <= 1'b0;
      out_sbd_ok <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (out_req && out_ack) out_req <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (in_req && in_data.sof) begin
            r        <= '0;
            slot_new <= '0;
            slot_old <= SLW'(1);
            rx       <= XW'(1);
            state    <= (IMG_W == 1) ? S_PROC : S_RECV;
            v        <= '0;
            s        <= '0;
          end
        end
        S_RECV: begin
          if (in_req) begin
            rx <= rx + 1'b1;
            if (32'(rx) == IMG_W - 1) begin
              state <= S_PROC;
              v     <= '0;
              s     <= '0;
            end
          end
        end
        S_PROC: begin
          if (adv) begin
            if (emit) begin
              out_req    <= 1'b1;
              out_disp   <= nb_d;
              out_sad    <= nb_sad;
              out_thr_ok <= (nb_sad >= thr_low) && (nb_sad <= thr_high);
              out_sbd_ok <= ((nb_d > ns_d) ? nb_d - ns_d : ns_d - nb_d) <= sbd_thr;
            end
            if (32'(s) == STEPS - 1) begin
              s <= '0;
              if (last_v) begin
                v        <= '0;
                r        <= r + 1'b1;
                slot_new <= (32'(slot_new) == SLOTS - 1) ? '0 : slot_new + 1'b1;
                slot_old <= (32'(slot_old) == SLOTS - 1) ? '0 : slot_old + 1'b1;
                if (32'(r) == IMG_H + M - 1) begin
                  state      <= S_IDLE;
                  frame_done <= 1'b1;
                end else if (32'(r) + 1 < IMG_H) begin
                  state <= S_RECV;
                  rx    <= '0;
                end
              end else begin
                v <= v + 1'b1;
              end
            end else begin
              s <= s + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

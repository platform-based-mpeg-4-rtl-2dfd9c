// me_halfpel: half-pixel refinement of one motion vector (16x16 block or one
// of the four 8x8 blocks) inside the search window already held on chip.
// Starting from an integer vector (cu,cv) whose SAD is known from the integer
// search, it evaluates the eight half-pixel neighbours (2cu+dh, 2cv+dv),
// dh,dv in {-1,0,+1}, in raster order, skipping those outside -16.0..+15.5.
// Reference pixels are interpolated bilinearly with upward rounding,
// (a+b+1)/2 or (a+b+c+d+2)/4, the compensation rule with rounding control 0.
// For each candidate the rows of the needed area are read from the window
// memory one half row (8 pixels) at a time, plus the ninth pixel when the
// horizontal component is half, i.e. one or two reads per row; the previous
// row's horizontal sums are kept so each window row is read once per half
// column. A one-row preroll is needed when the vertical component is half.
// The current-block half row is read together with the last window read of
// each producing row. Eight absolute differences per producing row are summed
// in an adder tree and accumulated on top of a rate bias
// lambda*(|hu-2pu|+|hv-2pv|) (half-pixel units); the candidate is abandoned
// as soon as its partial cost reaches the best cost so far (halfway
// termination), and the centre's cost, its SAD plus its bias, is the initial
// best. Ties keep the earlier candidate.
// Interface: start pulse with the block id (0 = 16x16, 1..4 = 8x8), centre,
// centre SAD, predictor and lambda; read port (rd_en, sw_x, sw_y, mb_row,
// mb_half) for the shared window and current-block memories whose data
// return one cycle later on sw_q/mb_q; done pulse with the best half-pixel
// vector (hu,hv) and its SAD. Timing: per candidate (1+hx) reads per row over
// n+hy rows and n/8 half columns, plus 4 cycles of drain and set-up.
// The refinement step and its eight-point pattern follow the document; the
// reading order, the row reuse, the bias and the termination are this
// design's choices.
module me_halfpel
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [2:0]  id,
  input  mv_t         cu,
  input  mv_t         cv,
  input  logic [SADW-1:0] c_sad,
  input  mv_t         pu,
  input  mv_t         pv,
  input  logic [3:0]  lambda,
  // shared read port
  output logic        rd_en,
  output logic [5:0]  sw_x,
  output logic [5:0]  sw_y,
  output logic [3:0]  mb_row,
  output logic        mb_half,
  input  logic [63:0] sw_q,
  input  logic [63:0] mb_q,
  // result
  output logic        busy,
  output logic        done,
  output hmv_t        best_u,
  output hmv_t        best_v,
  output logic [SADW-1:0] best_sad
);
  typedef enum logic [2:0] {H_IDLE, H_INIT, H_NEXT, H_RUN, H_DRAIN, H_DONE} hp_state_t;
  hp_state_t st;

  logic [2:0]  cid;
  hmv_t        hcu, hcv, hpu, hpv;
  logic [3:0]  lam;
  logic [3:0]  k;               // neighbour index 0..8 (centre skipped)
  hmv_t        hu, hv;          // current candidate, half-pixel units
  logic        hx, hy;
  mv_t         bu, bv;          // integer part (floor)
  logic [4:0]  r;               // window row within the candidate area
  logic        h, part;
  logic [1:0]  dcnt;
  logic        killed;
  logic [SADW-1:0] partial, best_cost, cur_bias;

  // ---- candidate geometry ----
  logic        two_halves;
  logic [4:0]  nrow;            // rows to read minus one
  logic [3:0]  bx, by;
  assign two_halves = (cid == 3'd0);
  assign bx   = (cid == 3'd2 || cid == 3'd4) ? 4'd8 : 4'd0;
  assign by   = (cid == 3'd3 || cid == 3'd4) ? 4'd8 : 4'd0;
  assign nrow = (two_halves ? 5'd15 : 5'd7) + 5'(hy);

  function automatic logic [SADW-1:0] bias_of(input hmv_t a, input hmv_t b, input hmv_t c, input hmv_t d,
                                               input logic [3:0] l);
    logic signed [7:0] e, f;
    e = 8'(a) - 8'(c); f = 8'(b) - 8'(d);
    if (e < 0) e = -e;
    if (f < 0) f = -f;
    return SADW'(l) * (SADW'(e) + SADW'(f));
  endfunction

  // neighbour k (0..8, 4 = centre) in raster order
  hmv_t nu, nv;
  logic nvalid;
  always_comb begin
    nu = hcu + hmv_t'(int'(k % 3) - 1);
    nv = hcv + hmv_t'(int'(k / 3) - 1);
    nvalid = (k != 4'd4) && (nu >= -hmv_t'(2 * SR)) && (nu <= hmv_t'(2 * SR - 1)) &&
             (nv >= -hmv_t'(2 * SR)) && (nv <= hmv_t'(2 * SR - 1));
  end

  // ---- read issue ----
  logic last_part, last_read, emit_row;
  assign last_part = (part == hx);
  assign last_read = last_part && (r == nrow) && (h || !two_halves);
  assign emit_row  = (r >= 5'(hy));
  assign rd_en     = (st == H_RUN) && !(partial >= best_cost);
  assign sw_x      = 6'(7'sd16 + 7'(bx) + 7'(bu) + (h ? 7'sd8 : 7'sd0) + (part ? 7'sd8 : 7'sd0));
  assign sw_y      = 6'(7'sd16 + 7'(by) + 7'(bv) + 7'(r));
  assign mb_row    = 4'(by + 4'(r - 5'(hy)));
  assign mb_half   = bx[3] | h;

  // ---- returned data: interpolation ----
  logic        d_v, d_last_part, d_emit;
  logic [63:0] cur0;
  logic [8:0]  hsum [8], prevh [8];
  logic [63:0] ipix;
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      logic [7:0] a, b;
      logic [9:0] s;
      if (hx) begin
        a = cur0[8*i +: 8];
        b = (i < 7) ? cur0[8*(i+1) +: 8] : sw_q[7:0];
      end else begin
        a = sw_q[8*i +: 8];
        b = a;
      end
      hsum[i] = 9'(a) + 9'(b);
      s = hy ? (10'(prevh[i]) + 10'(hsum[i]) + 10'd2) >> 2 : (10'(hsum[i]) + 10'd1) >> 1;
      ipix[8*i +: 8] = s[7:0];
    end
  end

  logic sad_in_v, sad_v, sad_l;
  logic [10:0] sad;
  assign sad_in_v = d_v && d_last_part && d_emit;
  me_sad_tree u_tree (.clk, .rst_n, .in_valid(sad_in_v), .in_last(1'b0), .a(mb_q), .b(ipix),
                      .out_valid(sad_v), .out_last(sad_l), .sad);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_v <= 1'b0; d_last_part <= 1'b0; d_emit <= 1'b0; cur0 <= '0;
      for (int i = 0; i < 8; i++) prevh[i] <= '0;
    end else begin
      d_v         <= rd_en;
      d_last_part <= last_part;
      d_emit      <= emit_row;
      if (d_v && !d_last_part) cur0 <= sw_q;
      if (d_v && d_last_part) for (int i = 0; i < 8; i++) prevh[i] <= hsum[i];
    end
  end

  // ---- control ----
  assign busy = (st != H_IDLE);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= H_IDLE; cid <= '0; hcu <= '0; hcv <= '0; hpu <= '0; hpv <= '0; lam <= '0; k <= '0;
      hu <= '0; hv <= '0; hx <= 1'b0; hy <= 1'b0; bu <= '0; bv <= '0; r <= '0; h <= 1'b0; part <= 1'b0;
      dcnt <= '0; killed <= 1'b0; partial <= '0; best_cost <= '0; cur_bias <= '0;
      best_u <= '0; best_v <= '0; best_sad <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (sad_v && !killed) partial <= partial + SADW'(sad);
      unique case (st)
        H_IDLE: if (start) begin
          cid <= id; lam <= lambda;
          hcu <= hmv_t'(2 * cu); hcv <= hmv_t'(2 * cv);
          hpu <= hmv_t'(2 * pu); hpv <= hmv_t'(2 * pv);
          best_u <= hmv_t'(2 * cu); best_v <= hmv_t'(2 * cv); best_sad <= c_sad;
          k <= '0;
          st <= H_INIT;
        end
        H_INIT: begin
          best_cost <= c_sad + bias_of(hcu, hcv, hpu, hpv, lam);
          st <= H_NEXT;
        end
        H_NEXT: begin
          if (k == 4'd9) st <= H_DONE;
          else if (!nvalid) k <= k + 4'd1;
          else begin
            hu <= nu; hv <= nv;
            hx <= nu[0]; hy <= nv[0];
            bu <= mv_t'(nu >>> 1); bv <= mv_t'(nv >>> 1);
            r <= '0; h <= 1'b0; part <= 1'b0; killed <= 1'b0;
            partial  <= bias_of(nu, nv, hpu, hpv, lam);
            cur_bias <= bias_of(nu, nv, hpu, hpv, lam);
            st <= H_RUN;
          end
        end
        H_RUN: begin
          if (partial >= best_cost) begin
            killed <= 1'b1; dcnt <= '0; st <= H_DRAIN;
          end else begin
            if (!last_part) part <= 1'b1;
            else begin
              part <= 1'b0;
              if (r == nrow) begin r <= '0; h <= 1'b1; end
              else r <= r + 5'd1;
            end
            if (last_read) begin dcnt <= '0; st <= H_DRAIN; end
          end
        end
        H_DRAIN: begin
          dcnt <= dcnt + 2'd1;
          if (dcnt == 2'd2) begin
            if (!killed && partial < best_cost) begin
              best_cost <= partial; best_sad <= partial - cur_bias;
              best_u <= hu; best_v <= hv;
            end
            k  <= k + 4'd1;
            st <= H_NEXT;
          end
        end
        H_DONE: begin done <= 1'b1; st <= H_IDLE; end
        default: st <= H_IDLE;
      endcase
    end
  end
endmodule

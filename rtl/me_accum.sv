// me_accum: rate-biased accumulator with accumulation-comparison (ACE) of the
// distortion calculation stage. At the start of a candidate the accumulator
// is preset to a rate bias, lambda * (|u-pu| + |v-pv|), the cost of coding the
// vector's difference from the predictor (pu,pv); the absolute-difference sums
// of each half row are then added. When the last row arrives the total cost
// is compared with the minimum so far and, if smaller, becomes the new minimum
// with its vector and its plain SAD. A `terminate` from the termination
// detector drops the candidate; reads still in flight for it are ignored.
// `done` pulses once per candidate, finished or dropped. `clear` restarts the
// minimum for a new block search. The rate-biased accumulation is named in
// the document; the bias formula is this design's choice.
module me_accum
  import me_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            start,
  input  mv_t             u,
  input  mv_t             v,
  input  mv_t             pu,
  input  mv_t             pv,
  input  logic [3:0]      lambda,
  input  logic            in_valid,
  input  logic            in_last,
  input  logic [10:0]     sad,
  input  logic            terminate,
  output logic            active,
  output logic [SADW-1:0] partial,
  output logic [SADW-1:0] min_cost,
  output logic [SADW-1:0] min_sad,
  output mv_t             best_u,
  output mv_t             best_v,
  output logic            done,
  output logic            killed
);
  logic [SADW-1:0] bias, cur_bias, total;
  mv_t             cu, cv;
  logic [MVW:0]    du, dv;

  always_comb begin
    du    = (MVW+1)'(u) - (MVW+1)'(pu);
    dv    = (MVW+1)'(v) - (MVW+1)'(pv);
    if (du[MVW]) du = -du;
    if (dv[MVW]) dv = -dv;
    bias  = SADW'(lambda) * (SADW'(du) + SADW'(dv));
    total = partial + SADW'(sad);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; partial <= '0; cur_bias <= '0; cu <= '0; cv <= '0;
      min_cost <= '1; min_sad <= '1; best_u <= '0; best_v <= '0;
      done <= 1'b0; killed <= 1'b0;
    end else begin
      done   <= 1'b0;
      killed <= 1'b0;
      if (clear) begin
        min_cost <= '1; min_sad <= '1; best_u <= '0; best_v <= '0;
      end
      if (start) begin
        active   <= 1'b1;
        partial  <= bias;
        cur_bias <= bias;
        cu <= u; cv <= v;
      end else if (active && terminate) begin
        active <= 1'b0;
        done   <= 1'b1;
        killed <= 1'b1;
      end else if (active && in_valid) begin
        partial <= total;
        if (in_last) begin
          active <= 1'b0;
          done   <= 1'b1;
          if (total < min_cost) begin
            min_cost <= total;
            min_sad  <= total - cur_bias;
            best_u   <= cu;
            best_v   <= cv;
          end
        end
      end
    end
  end
endmodule

// wssr_mdl: minimum-description-length (MDL) model-order estimator.
//
// Estimates the number of occupied subbands N-hat from the 2P eigenvalues of
// the real symmetric covariance form, where every eigenvalue of the complex
// P x P covariance matrix appears twice. With lambda_1 >= ... >= lambda_P
// (every other sorted value) it evaluates, for r = 1..P-1,
//   mdl_r = -M*L_r + B_r*log10(S_r) + C_r,
//   L_r = sum_{i>r} log10(lambda_i),  S_r = sum_{i>r} lambda_i,
//   B_r = M*(P-r),  C_r = r(2P-r)/2*log10(M) + M(P-r)*log10(1/(P-r)),
// and returns the r with the smallest |mdl_r|.
//
// Schedule (one shared accumulator, REG-A, feeding a shift chain):
//   start  : the merge-sort network (wssr_sort) output is registered.
//   SSUM   : 7 cycles, REG-A accumulates lambda_P, lambda_P-1, ... lambda_2;
//            the chain then holds S_1..S_7.
//   LOG1   : the 7 LOGLAM units take log10(lambda_2..lambda_8) (17 cycles).
//   LSUM   : 7 cycles, REG-A accumulates the logs into L_1..L_7, while the
//            LOGLAM units work on S_1..S_7 (17 cycles).
//   CALC   : one r per cycle through the REG-M1 / REG-M2 multipliers, the
//            ADD-M and ADD-C adders and the minimum search; 2-stage pipeline.
// done pulses 52 cycles after start; n_hat, the mdl_r values and the
// sorted-position-to-input index map (idx) hold until the next start.
// Formats: eigenvalues 16-bit unsigned integers, S_r 19 bits, logarithms
// and L_r signed Q.12 in 19 bits, mdl_r signed Q.12 in 40 bits. The block
// structure (sorter, LGM with 7 CORDIC log units, CMS accumulator with
// REG-A chain, B_r/C_r multiplexers, min search) follows the published
// design; its cycle-level schedule is this design's. C_r comes from the
// table in wssr_pkg, valid for P = 8 and M = 1024.
module wssr_mdl
  import wssr_pkg::*;
#(
  parameter int unsigned P = P_COSETS,
  parameter int unsigned M = M_DEF
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [EV_W-1:0]              lambda [2*P],
  output logic                         done,
  output logic [$clog2(P+1)-1:0]       n_hat,
  output logic [$clog2(2*P)-1:0]       idx    [2*P],
  output logic signed [39:0]           mdl    [P-1]
);
  localparam int unsigned NR = P - 1;
  localparam int unsigned NW = $clog2(P + 1);
  localparam int unsigned MB = $clog2(M);

  typedef enum logic [2:0] {S_IDLE, S_SSUM, S_LOG1, S_LSUM, S_CALC} state_t;
  state_t state;

  logic [EV_W-1:0]            srt_key [2*P];
  logic [$clog2(2*P)-1:0]     srt_idx [2*P];
  logic [EV_W-1:0]            ev      [P];       // lambda_1..lambda_P
  logic signed [LOG_W-1:0]    reg_a;
  logic signed [LOG_W-1:0]    chain   [NR];
  logic [SUM_W-1:0]           reg_s   [NR];      // S_r, r = 1..7
  logic signed [LOG_W-1:0]    reg_l   [NR];      // L_r
  logic signed [LOG_W-1:0]    lam_log [NR];      // log10(lambda_2..lambda_8)
  logic [SUM_W-1:0]           lg_in   [NR];
  logic signed [LOG_W-1:0]    lg_out  [NR];
  logic [NR-1:0]              lg_done;
  logic                       lg_start, lg_sel;
  logic [3:0]                 count;
  localparam int unsigned     IW = $clog2(NR);
  logic [IW-1:0]              cidx;              // count as an index into the r tables
  assign cidx = IW'(count);
  int                         br_val;            // B_r = M(P-r), r = count+1
  assign br_val = int'(M) * (int'(P) - 1 - int'(count));
  logic signed [39:0]         reg_m1, reg_m2, best;
  logic [NW-1:0]              r_d;
  logic                       v_d;
  logic signed [LOG_W-1:0]    addend;
  logic signed [LOG_W-1:0]    acc_next;

  wssr_sort #(.N(2*P), .KW(EV_W)) u_ms (.key_in(lambda), .key_out(srt_key), .idx_out(srt_idx));

  // LGM: MUX-L1..7 (0: eigenvalues, 1: S_r) and LOGLAM-1..7
  for (genvar k = 0; k < int'(NR); k++) begin : g_lg
    assign lg_in[k] = lg_sel ? reg_s[k] : SUM_W'(ev[k+1]);
    wssr_loglam #(.W(SUM_W)) u_log (
      .clk(clk), .rst_n(rst_n), .start(lg_start), .v(lg_in[k]),
      .done(lg_done[k]), .y(lg_out[k])
    );
  end

  // CMS: MUX-S / MUX-A select the next addend, highest index first
  always_comb begin
    if (state == S_SSUM) addend = LOG_W'(ev[P-1-int'(count)]);
    else                 addend = lam_log[NR-1-int'(count)];
    acc_next = ((count == 0) ? '0 : reg_a) + addend;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      done     <= 1'b0;
      n_hat    <= '0;
      count    <= '0;
      lg_start <= 1'b0;
      lg_sel   <= 1'b0;
      reg_a    <= '0;
      reg_m1   <= '0;
      reg_m2   <= '0;
      best     <= '0;
      r_d      <= '0;
      v_d      <= 1'b0;
      for (int i = 0; i < int'(P); i++) ev[i] <= '0;
      for (int i = 0; i < int'(2*P); i++) idx[i] <= '0;
      for (int i = 0; i < int'(NR); i++) begin
        chain[i] <= '0; reg_s[i] <= '0; reg_l[i] <= '0; lam_log[i] <= '0; mdl[i] <= '0;
      end
    end else begin
      done     <= 1'b0;
      lg_start <= 1'b0;
      v_d      <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          for (int i = 0; i < int'(P); i++) ev[i] <= srt_key[2*i];
          idx   <= srt_idx;
          count <= '0;
          state <= S_SSUM;
        end
        S_SSUM: begin
          reg_a    <= acc_next;
          chain[0] <= acc_next;
          for (int i = 1; i < int'(NR); i++) chain[i] <= chain[i-1];
          count <= count + 1'b1;
          if (count == 4'(NR - 1)) begin
            for (int i = 1; i < int'(NR); i++) reg_s[i] <= SUM_W'(chain[i-1]);
            reg_s[0] <= SUM_W'(acc_next);
            lg_sel   <= 1'b0;
            lg_start <= 1'b1;
            count    <= '0;
            state    <= S_LOG1;
          end
        end
        S_LOG1: if (lg_done[0]) begin
          lam_log  <= lg_out;
          lg_sel   <= 1'b1;
          lg_start <= 1'b1;
          state    <= S_LSUM;
        end
        S_LSUM: begin
          if (count != 4'(NR)) begin
            reg_a    <= acc_next;
            chain[0] <= acc_next;
            for (int i = 1; i < int'(NR); i++) chain[i] <= chain[i-1];
            count <= count + 1'b1;
          end
          if (count == 4'(NR)) reg_l <= chain;
          if (lg_done[0]) begin
            count <= '0;
            state <= S_CALC;
          end
        end
        S_CALC: begin
          // stage 1: REG-M1 = -M*L_r, REG-M2 = B_r*log10(S_r)
          if (count != 4'(NR)) begin
            reg_m1 <= -(40'(reg_l[cidx]) <<< MB);
            reg_m2 <= 40'(lg_out[cidx]) * 40'(br_val);
            r_d    <= NW'(count + 1);
            v_d    <= 1'b1;
            count  <= count + 1'b1;
          end
          // stage 2: ADD-M, ADD-C, |mdl_r| minimum search
          if (v_d) begin
            automatic logic signed [39:0] m = reg_m1 + reg_m2 + C_R[r_d-1];
            automatic logic signed [39:0] a = (m < 0) ? -m : m;
            mdl[r_d-1] <= m;
            if (r_d == NW'(1) || a < best) begin
              best  <= a;
              n_hat <= r_d;
            end
            if (r_d == NW'(NR)) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

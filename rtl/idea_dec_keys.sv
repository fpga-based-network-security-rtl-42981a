// Decryption key generator for IDEA.
//
// IDEA decrypts with the same datapath as it encrypts, using subkeys derived from the
// encryption subkeys EK (groups 1..9, keys Z1..Z6):
//   group 1     : Z1 = EK9.Z1^-1  Z2 = -EK9.Z2  Z3 = -EK9.Z3  Z4 = EK9.Z4^-1  Z5,Z6 = EK8.Z5,Z6
//   group i 2..8: Z1 = EKj.Z1^-1  Z2 = -EKj.Z3  Z3 = -EKj.Z2  Z4 = EKj.Z4^-1  Z5,Z6 = EK(j-1).Z5,Z6
//                 with j = 10 - i
//   group 9     : Z1 = EK1.Z1^-1  Z2 = -EK1.Z2  Z3 = -EK1.Z3  Z4 = EK1.Z4^-1
// (^-1 multiplicative inverse modulo 2^16+1 with 0 standing for 2^16, - additive
// inverse modulo 2^16).
// The additive inverses and copies are taken when start is pulsed. The 18
// multiplicative inverses are then computed one after another by Fermat's theorem,
// x^-1 = x^(2^16 - 1) = x^(2^16 + 1 - 2), with one idea_mulmod: 15 steps of
// "square, then multiply by x", each product taking one issue clock and the multiplier's 7 clocks.
// busy is high from start until dk is complete (18 x 30 x 8 = 4320 clocks plus a
// few); done pulses once at the end. The document states only that the decryption
// keys are these inverses; the sequential Fermat method, the single shared
// multiplier and the start/busy/done interface are this design's choices.
module idea_dec_keys
  import idea_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,        // take ek and begin
  input  ktab_t ek,           // encryption subkeys
  output logic  busy,
  output logic  done,
  output ktab_t dk            // decryption subkeys, valid when busy is low after done
);
  localparam int unsigned NINV = 2 * (ROUNDS + 1);   // Z1 and Z4 of every group
  localparam int unsigned NSTEP = 2 * (W - 1);        // 15 x (square, multiply)

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;
  state_e state;

  logic [$clog2(NINV)-1:0]  idx;       // which inverse
  logic [$clog2(NSTEP)-1:0] step;      // even: square, odd: multiply by x
  word_t x, r;
  logic  m_in_valid, m_out_valid;
  word_t m_a, m_b, m_p;

  idea_mulmod u_mul (.clk, .rst_n, .in_valid(m_in_valid), .a(m_a), .b(m_b),
                     .out_valid(m_out_valid), .p(m_p));

  // source of inverse idx: group g = idx/2, key Z1 (even idx) or Z4 (odd idx),
  // taken from encryption group 8 - g (0-based)
  function automatic word_t inv_src(input ktab_t k, input int unsigned i);
    return k[ROUNDS - i / 2][(i % 2 == 0) ? 0 : 3];
  endfunction

  assign m_in_valid = (state == S_ISSUE);
  assign m_a        = r;
  assign m_b        = step[0] ? x : r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      busy  <= 1'b0;
      done  <= 1'b0;
      idx   <= '0;
      step  <= '0;
      x     <= '0;
      r     <= '0;
      for (int g = 0; g <= ROUNDS; g++) for (int j = 0; j < 6; j++) dk[g][j] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int g = 0; g <= ROUNDS; g++) begin
            // source group, 0-based: ROUNDS - g
            if (g == 0 || g == ROUNDS) begin
              dk[g][1] <= -ek[ROUNDS-g][1];
              dk[g][2] <= -ek[ROUNDS-g][2];
            end else begin
              dk[g][1] <= -ek[ROUNDS-g][2];
              dk[g][2] <= -ek[ROUNDS-g][1];
            end
            if (g < ROUNDS) begin
              dk[g][4] <= ek[ROUNDS-g-1][4];
              dk[g][5] <= ek[ROUNDS-g-1][5];
            end else begin
              dk[g][4] <= '0;
              dk[g][5] <= '0;
            end
          end
          idx   <= '0;
          step  <= '0;
          x     <= inv_src(ek, 0);
          r     <= inv_src(ek, 0);
          busy  <= 1'b1;
          state <= S_ISSUE;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (m_out_valid) begin
          if (32'(step) == NSTEP - 1) begin
            dk[idx / 2][(idx % 2 == 0) ? 0 : 3] <= m_p;
            if (32'(idx) == NINV - 1) begin
              busy  <= 1'b0;
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              idx   <= idx + 1'b1;
              step  <= '0;
              x     <= inv_src(ek, 32'(idx) + 1);
              r     <= inv_src(ek, 32'(idx) + 1);
              state <= S_ISSUE;
            end
          end else begin
            r     <= m_p;
            step  <= step + 1'b1;
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

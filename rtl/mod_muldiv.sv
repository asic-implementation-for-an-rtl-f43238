// mod_muldiv: integrated modular multiplier and divider.
//
// One unit with one set of working registers (A, B, U, V) computes either
//   MUL: y = a * b * 2^-WIDTH mod m     (radix-2 Montgomery multiplication)
//   DIV: y = a / b mod m                (binary modular division)
// for any odd modulus m (the field prime p or the group order n).
//
// MUL keeps its accumulator T in radix-2 signed-digit form, T = U - V
// (U holds the plus digits, V the minus digits), so no carry propagates
// inside the WIDTH iterations. One multiplier bit per cycle (A holds a,
// shifted right; B holds b):
//   S1 = T + A[0]*B          carry-free signed-digit addition
//   q  = parity of S1        = plus[0] xor minus[0]
//   S2 = S1 + q*m            carry-free signed-digit addition, S2 even
//   T <= S2 / 2              drop digit 0
// T stays below 2m < 2^(WIDTH+1), so the digit that the two additions add
// on top can always be folded into the one below it (their combined value
// 2*d_top + d_next is -1, 0 or 1), which keeps T at WIDTH+2 digits.
// After WIDTH cycles one cycle converts T to binary (U <= U - V) and one
// cycle subtracts m if T >= m.
//
// DIV (A = b, B = m, U = a, V = 0, loop until A == B, which ends at 1):
//   A even:  A <= A/2,       U <= half(U)
//   B even:  B <= B/2,       V <= half(V)
//   A > B:   A <= (A-B)/2,   U <= half((U - V) mod m)
//   else:    B <= (B-A)/2,   V <= half((V - U) mod m)
// with half(w) = (w + w[0]*m) / 2 = w/2 mod m. The invariant
// U*b = a*A (mod m) gives U = a/b once A = 1. At most about 2*WIDTH cycles.
// The U - V subtractor of the division also does the final conversion of
// the multiplication.
//
// Preconditions: b < m for MUL; a < m, 0 < b < m and gcd(b, m) = 1 for DIV.
// b = 0 in DIV ends at once with err set and y = 0.
//
// Interface: start (one cycle, operands sampled) ... done (one cycle, y and
// err valid, held until the next start). busy is high in between.
// MUL takes WIDTH + 3 cycles from start to done.
// Montgomery multiplication, signed-digit arithmetic and the sharing of
// multiplication and division hardware follow the source design; the
// particular algorithms, digit encoding and timing are this
// implementation's choices.
module mod_muldiv #(
  parameter int unsigned WIDTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             div,     // 0: Montgomery multiply, 1: divide
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] m,
  output logic [WIDTH-1:0] y,
  output logic             err,
  output logic             busy,
  output logic             done
);

  localparam int unsigned D = WIDTH + 2;   // digits of the accumulator

  typedef enum logic [2:0] {S_IDLE, S_MUL, S_MCVT, S_MFIN, S_DIV} state_t;
  state_t state;

  logic [WIDTH-1:0] A, B, M;
  logic [D-1:0]     U, V;                  // MUL: plus/minus digits of T
  logic [$clog2(WIDTH+1)-1:0] cnt;

  // signed-digit multiplication step
  logic [D:0]   s1p, s1n;
  logic [D+1:0] s2p, s2n;
  logic         q;
  logic signed [2:0] top;
  logic [D-1:0] tp_next, tn_next;

  rsd_adder #(.WIDTH(D)) u_acc (
    .xp(U), .xn(V),
    .yp(A[0] ? {2'b0, B} : '0), .yn('0),
    .zp(s1p), .zn(s1n)
  );

  assign q = s1p[0] ^ s1n[0];

  rsd_adder #(.WIDTH(D + 1)) u_red (
    .xp(s1p), .xn(s1n),
    .yp(q ? {3'b0, M} : '0), .yn('0),
    .zp(s2p), .zn(s2n)
  );

  always_comb begin
    // S2/2 has digits 1..D+1 of S2; fold digit D+1 into digit D
    top = 3'sd2 * (signed'({2'b0, s2p[D+1]}) - signed'({2'b0, s2n[D+1]}))
        + (signed'({2'b0, s2p[D]}) - signed'({2'b0, s2n[D]}));
    tp_next = {top == 3'sd1,  s2p[D-1:1]};
    tn_next = {top == -3'sd1, s2n[D-1:1]};
  end

  // division datapath and shared subtractor
  logic [WIDTH+1:0] hin, hsum;
  logic [WIDTH:0]   hout;
  logic [WIDTH:0]   ab_diff, ba_diff;
  logic [D:0]       uv_diff;               // U - V (V - U in a B step)
  logic [WIDTH:0]   uv_wrap;
  logic [WIDTH-1:0] uv_mod;
  logic             upd_v;                 // division step updates V (else U)
  logic             b_step;                // A and B odd, A < B
  logic [D:0]       fin_diff;

  always_comb begin
    ab_diff = {1'b0, A} - {1'b0, B};
    ba_diff = {1'b0, B} - {1'b0, A};
    b_step  = A[0] && B[0] && ab_diff[WIDTH];
    uv_diff = b_step ? ({1'b0, V} - {1'b0, U}) : ({1'b0, U} - {1'b0, V});
    uv_wrap = uv_diff[WIDTH:0] + {1'b0, M};
    uv_mod  = uv_diff[D] ? uv_wrap[WIDTH-1:0] : uv_diff[WIDTH-1:0];
    upd_v   = 1'b0;
    if (!A[0]) begin
      hin = {2'b0, U[WIDTH-1:0]};
    end else if (!B[0]) begin
      upd_v = 1'b1;
      hin   = {2'b0, V[WIDTH-1:0]};
    end else begin
      upd_v = b_step;
      hin   = {2'b0, uv_mod};
    end
    hsum     = hin + (hin[0] ? {2'b0, M} : '0);
    hout     = hsum[WIDTH+1:1];
    fin_diff = {1'b0, U} - {3'b0, M};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      A <= '0; B <= '0; U <= '0; V <= '0; M <= '0;
      cnt <= '0;
      y <= '0; err <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            M   <= m;
            err <= 1'b0;
            cnt <= '0;
            V   <= '0;
            if (div) begin
              A <= b; B <= m; U <= {2'b0, a};
              if (b == '0) begin
                err  <= 1'b1;
                y    <= '0;
                done <= 1'b1;
              end else begin
                state <= S_DIV;
              end
            end else begin
              A <= a; B <= b; U <= '0;
              state <= S_MUL;
            end
          end
        end
        S_MUL: begin
          U   <= tp_next;
          V   <= tn_next;
          A   <= A >> 1;
          cnt <= cnt + 1'b1;
          if (cnt == WIDTH[$bits(cnt)-1:0] - 1'b1) state <= S_MCVT;
        end
        S_MCVT: begin
          U     <= uv_diff[D-1:0];       // T in binary, 0 <= T < 2m
          V     <= '0;
          state <= S_MFIN;
        end
        S_MFIN: begin
          y     <= fin_diff[D] ? U[WIDTH-1:0] : fin_diff[WIDTH-1:0];
          done  <= 1'b1;
          state <= S_IDLE;
        end
        S_DIV: begin
          if (A == B) begin
            y     <= U[WIDTH-1:0];
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            if (!A[0])                A <= A >> 1;
            else if (!B[0])           B <= B >> 1;
            else if (!ab_diff[WIDTH]) A <= ab_diff[WIDTH:1];
            else                      B <= ba_diff[WIDTH:1];
            if (upd_v) V <= {2'b0, hout[WIDTH-1:0]};
            else       U <= {1'b0, hout};
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule

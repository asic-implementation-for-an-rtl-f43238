// ecc_control: micro-programmed control unit of the ECC processor.
//
// Every host command is a short program of micro-operations (ecc_pkg::uop_t)
// held in a ROM. A field micro-op names a unit operation (modular add, sub,
// Montgomery multiply, divide), the modulus (p or n) and three operand
// memory addresses. Point doubling and point addition are not separate
// hardware: they are micro-routines run on the same two arithmetic units,
// which is how the design keeps its area small.
//
// Points are kept in affine coordinates, in Montgomery form (x*R mod p).
// With lambda the slope, both routines form lambda by one modular division,
// which cancels the Montgomery factor, so lambda is brought back to
// Montgomery form by one multiplication by R^2 mod p:
//   doubling:  lambda = (3x^2 - 3) / 2y,      x3 = lambda^2 - 2x
//   addition:  lambda = (py - y) / (px - x),  x3 = lambda^2 - x - px
//              y3 = lambda (x - x3) - y
// UOP_SMUL runs left-to-right double-and-add over the scalar register:
// it shifts out leading zeros, starts from Q = P at the top one bit, then
// for each further bit doubles Q and, for a one bit, adds P.
//
// Each micro-op takes a read cycle (the operand memory is synchronous), an
// issue cycle, and then waits for the unit's done; the result is written
// in the done cycle.
//
// Interface: cmd is taken when cmd_start is high and the unit is idle.
// busy stays high until done pulses. err is set when a division by zero
// occurs (a point at infinity would arise) or the scalar is zero; valid is
// the ECDSA verification outcome (last comparison, with no error).
// The command set, the micro-op encoding and the affine/Montgomery
// formulation are this implementation's choices; the document gives the
// operation-code control unit, point addition and doubling, and the
// signature and key-exchange algorithms.
module ecc_control
  import ecc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // command
  input  logic      cmd_start,
  input  cmd_t      cmd,
  output logic      busy,
  output logic      done,
  output logic      err,
  output logic      valid,
  // operand memory
  output reg_addr_t ra_addr,
  output reg_addr_t rb_addr,
  input  word_t     ra_data,
  input  word_t     rb_data,
  output logic      we,
  output reg_addr_t wa,
  output word_t     wd,
  // arithmetic units
  output logic      modn,
  output logic      as_start,
  output logic      as_sub,
  input  word_t     as_y,
  input  logic      as_done,
  output logic      md_start,
  output logic      md_div,
  input  word_t     md_y,
  input  logic      md_err,
  input  logic      md_done
);

  typedef logic [6:0] upc_t;

  // routine and program entry points in the micro-ROM
  localparam upc_t PC_INIT   = 7'd0;
  localparam upc_t PC_DBL    = 7'd2;
  localparam upc_t PC_PADD   = 7'd16;
  localparam upc_t PC_KEYGEN = 7'd27;
  localparam upc_t PC_ECDH   = 7'd34;
  localparam upc_t PC_PMUL   = 7'd41;
  localparam upc_t PC_SIGN   = 7'd48;
  localparam upc_t PC_VERIFY = 7'd60;

  function automatic uop_t U(uop_code_t op, logic mn, logic last,
                             reg_addr_t d, reg_addr_t a, reg_addr_t b);
    return '{op: op, modn: mn, last: last, dst: d, a: a, b: b};
  endfunction

  localparam reg_addr_t Z = RA_ZERO;

  function automatic uop_t urom(input upc_t pc);
    unique case (pc)
      // INIT: Q = P
      7'd0:  return U(UOP_ADD, 0, 0, RA_X,  RA_PX, Z);
      7'd1:  return U(UOP_ADD, 0, 1, RA_Y,  RA_PY, Z);
      // DBL: Q = 2Q
      7'd2:  return U(UOP_MUL, 0, 0, RA_T1, RA_X,  RA_X);     // x^2
      7'd3:  return U(UOP_ADD, 0, 0, RA_T2, RA_T1, RA_T1);
      7'd4:  return U(UOP_ADD, 0, 0, RA_T1, RA_T2, RA_T1);    // 3x^2
      7'd5:  return U(UOP_SUB, 0, 0, RA_T1, RA_T1, RA_C3R);   // 3x^2 + a
      7'd6:  return U(UOP_ADD, 0, 0, RA_T2, RA_Y,  RA_Y);     // 2y
      7'd7:  return U(UOP_DIV, 0, 0, RA_T1, RA_T1, RA_T2);    // lambda
      7'd8:  return U(UOP_MUL, 0, 0, RA_T1, RA_T1, RA_R2P);   // to Montgomery form
      7'd9:  return U(UOP_MUL, 0, 0, RA_T2, RA_T1, RA_T1);    // lambda^2
      7'd10: return U(UOP_SUB, 0, 0, RA_T2, RA_T2, RA_X);
      7'd11: return U(UOP_SUB, 0, 0, RA_T2, RA_T2, RA_X);     // x3
      7'd12: return U(UOP_SUB, 0, 0, RA_T3, RA_X,  RA_T2);
      7'd13: return U(UOP_MUL, 0, 0, RA_T3, RA_T1, RA_T3);
      7'd14: return U(UOP_SUB, 0, 0, RA_Y,  RA_T3, RA_Y);     // y3
      7'd15: return U(UOP_ADD, 0, 1, RA_X,  RA_T2, Z);
      // PADD: Q = Q + P
      7'd16: return U(UOP_SUB, 0, 0, RA_T1, RA_PY, RA_Y);
      7'd17: return U(UOP_SUB, 0, 0, RA_T2, RA_PX, RA_X);
      7'd18: return U(UOP_DIV, 0, 0, RA_T1, RA_T1, RA_T2);    // lambda
      7'd19: return U(UOP_MUL, 0, 0, RA_T1, RA_T1, RA_R2P);
      7'd20: return U(UOP_MUL, 0, 0, RA_T2, RA_T1, RA_T1);
      7'd21: return U(UOP_SUB, 0, 0, RA_T2, RA_T2, RA_X);
      7'd22: return U(UOP_SUB, 0, 0, RA_T2, RA_T2, RA_PX);    // x3
      7'd23: return U(UOP_SUB, 0, 0, RA_T3, RA_X,  RA_T2);
      7'd24: return U(UOP_MUL, 0, 0, RA_T3, RA_T1, RA_T3);
      7'd25: return U(UOP_SUB, 0, 0, RA_Y,  RA_T3, RA_Y);     // y3
      7'd26: return U(UOP_ADD, 0, 1, RA_X,  RA_T2, Z);
      // KEYGEN: (QX,QY) = D * G
      7'd27: return U(UOP_LDK, 0, 0, Z,     RA_D,  Z);
      7'd28: return U(UOP_MUL, 0, 0, RA_PX, RA_GX, RA_R2P);
      7'd29: return U(UOP_MUL, 0, 0, RA_PY, RA_GY, RA_R2P);
      7'd30: return U(UOP_SMUL, 0, 0, Z,    Z,     Z);
      7'd31: return U(UOP_MUL, 0, 0, RA_QX, RA_X,  RA_ONE);   // out of Montgomery form
      7'd32: return U(UOP_MUL, 0, 0, RA_QY, RA_Y,  RA_ONE);
      7'd33: return U(UOP_END, 0, 0, Z,     Z,     Z);
      // ECDH: (OX,OY) = D * (INX,INY)
      7'd34: return U(UOP_LDK, 0, 0, Z,     RA_D,  Z);
      7'd35: return U(UOP_MUL, 0, 0, RA_PX, RA_INX, RA_R2P);
      7'd36: return U(UOP_MUL, 0, 0, RA_PY, RA_INY, RA_R2P);
      7'd37: return U(UOP_SMUL, 0, 0, Z,    Z,     Z);
      7'd38: return U(UOP_MUL, 0, 0, RA_OX, RA_X,  RA_ONE);
      7'd39: return U(UOP_MUL, 0, 0, RA_OY, RA_Y,  RA_ONE);
      7'd40: return U(UOP_END, 0, 0, Z,     Z,     Z);
      // PMUL: (OX,OY) = K * (INX,INY)
      7'd41: return U(UOP_LDK, 0, 0, Z,     RA_K,  Z);
      7'd42: return U(UOP_MUL, 0, 0, RA_PX, RA_INX, RA_R2P);
      7'd43: return U(UOP_MUL, 0, 0, RA_PY, RA_INY, RA_R2P);
      7'd44: return U(UOP_SMUL, 0, 0, Z,    Z,     Z);
      7'd45: return U(UOP_MUL, 0, 0, RA_OX, RA_X,  RA_ONE);
      7'd46: return U(UOP_MUL, 0, 0, RA_OY, RA_Y,  RA_ONE);
      7'd47: return U(UOP_END, 0, 0, Z,     Z,     Z);
      // SIGN: r = x(kG) mod n, s = (H + d r) / k mod n
      7'd48: return U(UOP_LDK, 0, 0, Z,     RA_K,  Z);
      7'd49: return U(UOP_MUL, 0, 0, RA_PX, RA_GX, RA_R2P);
      7'd50: return U(UOP_MUL, 0, 0, RA_PY, RA_GY, RA_R2P);
      7'd51: return U(UOP_SMUL, 0, 0, Z,    Z,     Z);
      7'd52: return U(UOP_MUL, 0, 0, RA_T1, RA_X,  RA_ONE);
      7'd53: return U(UOP_ADD, 1, 0, RA_R,  RA_T1, Z);        // x mod n
      7'd54: return U(UOP_MUL, 1, 0, RA_T2, RA_D,  RA_R);     // d r / R
      7'd55: return U(UOP_MUL, 1, 0, RA_T2, RA_T2, RA_R2N);   // d r
      7'd56: return U(UOP_ADD, 1, 0, RA_T3, RA_H,  Z);        // H mod n
      7'd57: return U(UOP_ADD, 1, 0, RA_T2, RA_T3, RA_T2);
      7'd58: return U(UOP_DIV, 1, 0, RA_S,  RA_T2, RA_K);
      7'd59: return U(UOP_END, 0, 0, Z,     Z,     Z);
      // VERIFY: x(u1 G + u2 Q) mod n == r, u1 = H/s, u2 = r/s
      7'd60: return U(UOP_ADD, 1, 0, RA_T3, RA_H,  Z);
      7'd61: return U(UOP_DIV, 1, 0, RA_U1, RA_T3, RA_S);
      7'd62: return U(UOP_DIV, 1, 0, RA_U2, RA_R,  RA_S);
      7'd63: return U(UOP_LDK, 0, 0, Z,     RA_U1, Z);
      7'd64: return U(UOP_MUL, 0, 0, RA_PX, RA_GX, RA_R2P);
      7'd65: return U(UOP_MUL, 0, 0, RA_PY, RA_GY, RA_R2P);
      7'd66: return U(UOP_SMUL, 0, 0, Z,    Z,     Z);
      7'd67: return U(UOP_ADD, 0, 0, RA_SX, RA_X,  Z);
      7'd68: return U(UOP_ADD, 0, 0, RA_SY, RA_Y,  Z);
      7'd69: return U(UOP_LDK, 0, 0, Z,     RA_U2, Z);
      7'd70: return U(UOP_MUL, 0, 0, RA_PX, RA_QX, RA_R2P);
      7'd71: return U(UOP_MUL, 0, 0, RA_PY, RA_QY, RA_R2P);
      7'd72: return U(UOP_SMUL, 0, 0, Z,    Z,     Z);
      7'd73: return U(UOP_ADD, 0, 0, RA_PX, RA_SX, Z);
      7'd74: return U(UOP_ADD, 0, 0, RA_PY, RA_SY, Z);
      7'd75: return U(UOP_PADD, 0, 0, Z,    Z,     Z);
      7'd76: return U(UOP_MUL, 0, 0, RA_T1, RA_X,  RA_ONE);
      7'd77: return U(UOP_ADD, 1, 0, RA_T1, RA_T1, Z);
      7'd78: return U(UOP_CMP, 0, 0, Z,     RA_T1, RA_R);
      default: return U(UOP_END, 0, 0, Z,   Z,     Z);
    endcase
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_READ, S_ISSUE, S_WAIT, S_NORM} state_t;
  typedef enum logic [1:0] {M_MAIN, M_SMUL, M_PADD} mode_t;
  typedef enum logic [1:0] {PH_INIT, PH_DBL, PH_ADD} phase_t;

  state_t state;
  mode_t  mode;
  phase_t phase;
  upc_t   pc, ret_pc;
  uop_t   uop;
  word_t  sk;                       // scalar shift register, current bit on top
  logic [$clog2(WIDTH)-1:0] cnt;    // scalar bits still to process
  logic   cmp_eq;

  assign uop     = urom(pc);
  assign ra_addr = uop.a;
  assign rb_addr = uop.b;
  assign wa      = uop.dst;
  assign modn    = uop.modn;
  assign as_sub  = (uop.op == UOP_SUB);
  assign md_div  = (uop.op == UOP_DIV);
  assign busy    = (state != S_IDLE);

  always_comb begin
    as_start = 1'b0;
    md_start = 1'b0;
    we       = 1'b0;
    wd       = '0;
    if (state == S_ISSUE) begin
      as_start = (uop.op == UOP_ADD) || (uop.op == UOP_SUB);
      md_start = (uop.op == UOP_MUL) || (uop.op == UOP_DIV);
    end
    if (state == S_WAIT) begin
      if (as_done) begin
        we = 1'b1;
        wd = as_y;
      end else if (md_done) begin
        we = 1'b1;
        wd = md_y;
      end
    end
  end

  function automatic upc_t entry(input cmd_t c);
    unique case (c)
      CMD_KEYGEN: return PC_KEYGEN;
      CMD_ECDH:   return PC_ECDH;
      CMD_PMUL:   return PC_PMUL;
      CMD_SIGN:   return PC_SIGN;
      CMD_VERIFY: return PC_VERIFY;
      default:    return 7'd33;       // an END micro-op
    endcase
  endfunction

  // next micro-op after the one at pc has completed
  upc_t   adv_pc;
  mode_t  adv_mode;
  phase_t adv_phase;
  logic   adv_shift;                // consume one scalar bit

  always_comb begin
    adv_pc    = pc + 1'b1;
    adv_mode  = mode;
    adv_phase = phase;
    adv_shift = 1'b0;
    if (uop.last) begin
      if (mode == M_PADD) begin
        adv_pc   = ret_pc;
        adv_mode = M_MAIN;
      end else if (phase == PH_DBL && sk[WIDTH-1]) begin
        adv_pc    = PC_PADD;
        adv_phase = PH_ADD;
      end else if (cnt == '0) begin
        adv_pc   = ret_pc;
        adv_mode = M_MAIN;
      end else begin
        adv_pc    = PC_DBL;
        adv_phase = PH_DBL;
        adv_shift = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      mode   <= M_MAIN;
      phase  <= PH_INIT;
      pc     <= '0;
      ret_pc <= '0;
      sk     <= '0;
      cnt    <= '0;
      cmp_eq <= 1'b0;
      err    <= 1'b0;
      valid  <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cmd_start) begin
            pc     <= entry(cmd);
            mode   <= M_MAIN;
            err    <= 1'b0;
            valid  <= 1'b0;
            cmp_eq <= 1'b0;
            state  <= S_READ;
          end
        end
        S_READ: state <= S_ISSUE;
        S_ISSUE: begin
          unique case (uop.op)
            UOP_ADD, UOP_SUB, UOP_MUL, UOP_DIV: state <= S_WAIT;
            UOP_LDK: begin
              sk    <= ra_data;
              pc    <= adv_pc;
              state <= S_READ;
            end
            UOP_CMP: begin
              cmp_eq <= (ra_data == rb_data);
              pc     <= adv_pc;
              state  <= S_READ;
            end
            UOP_SMUL: begin
              ret_pc <= pc + 1'b1;
              mode   <= M_SMUL;
              cnt    <= '1;                    // WIDTH-1 bits below the top one
              state  <= S_NORM;
            end
            UOP_PADD: begin
              ret_pc <= pc + 1'b1;
              mode   <= M_PADD;
              pc     <= PC_PADD;
              state  <= S_READ;
            end
            default: begin                     // UOP_END
              valid <= cmp_eq && !err;
              done  <= 1'b1;
              state <= S_IDLE;
            end
          endcase
        end
        S_WAIT: begin
          if (as_done || md_done) begin
            if (md_done && md_err) err <= 1'b1;
            pc    <= adv_pc;
            mode  <= adv_mode;
            phase <= adv_phase;
            state <= S_READ;
            if (adv_shift) begin
              sk  <= sk << 1;
              cnt <= cnt - 1'b1;
            end
          end
        end
        S_NORM: begin
          if (sk == '0) begin
            err   <= 1'b1;                     // k = 0: result is the point at infinity
            pc    <= ret_pc;
            mode  <= M_MAIN;
            state <= S_READ;
          end else if (sk[WIDTH-1]) begin
            pc    <= PC_INIT;
            phase <= PH_INIT;
            state <= S_READ;
          end else begin
            sk  <= sk << 1;
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a unit result must only arrive while a micro-op waits for it
  assert property (@(posedge clk) disable iff (!rst_n) (as_done || md_done) |-> state == S_WAIT)
    else $error("ecc_control: unexpected unit done");

endmodule

// ecc_cu: FSM-based control unit of the point-multiplication accelerator.
//
// Every cycle it issues one instruction (uop_t) to the read stage: register
// addresses for M1, M2 and the Dmux, the select of M3 and the ALU operation.
// The instruction is executed and written back in the following cycle, so an
// instruction may read a register written by the instruction issued two
// cycles earlier but not by the one issued in the cycle just before; every
// sequence below is scheduled for that, with no-ops where nothing else can
// fill the slot (no hardware interlock).
//
// A point multiplication Q = k.P runs through three steps:
//  1. Conversion to Lopez-Dahab projective form (S_INIT, 10 cycles):
//     T4 = T4+T4 (= 0), Z1 = xp, X1 = xp^2, Z2 = xp^2, X2 = xp^4 + b, so
//     (X1:Z1) = (xp^2 : xp) represents P and (X2:Z2) represents 2P.
//  2. The Montgomery ladder over key bits k[m-2] .. k[0], 17 cycles a bit:
//     one cycle to inspect the bit (S_KEY), the 15 issue slots of the
//     rescheduled point addition and doubling (S_LADDER, the 2-stage column
//     of the scheduling table, with its one bubble) and one cycle for the
//     write-back of the last instruction (S_DRAIN). For k_i = 1 the table is
//     used as written; for k_i = 0 the pairs (X1,Z1) and (X2,Z2) swap roles.
//  3. Reconversion to affine coordinates (S_RECA, S_INV, S_RECB, S_RECC) with
//     two Itoh-Tsujii inversions, of Z1 and of xp*Z1*Z2, after which X1 holds
//     xq and Z1 holds yq.
// The inversion computes a^(2^(m-1)-1) with the binary addition chain of m-1
// (m-1 squarings in all, plus floor(log2(m-1)) + HW(m-1) - 1
// multiplications) and squares it once more; each of its operations depends
// on the one before and is followed by one no-op.
//
// Interface: a one-cycle start pulse in idle begins an operation; busy is
// high until done, a one-cycle pulse that comes ecc_pkg::pm_latency(m) cycles after the
// cycle in which start was high.
// k, xp, yp and b must stay stable while busy. The order of the ladder
// instructions and the 17 cycles a key bit follow the design description;
// the conversion and reconversion sequences, the inversion chain and the
// start/done interface are this implementation's own.
module ecc_cu
  import ecc_pkg::*;
#(
  parameter int unsigned M = 571  // field size m
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,       // scalar, k[m-1] must be 1
  output uop_t         uop,     // instruction for the read stage
  output logic         busy,
  output logic         done
);
  // ---------------------------------------------------------------------
  // Inversion chain constants
  localparam int unsigned N     = M - 1;
  localparam int unsigned NB    = $clog2(N + 1);           // bit length of m-1
  localparam int unsigned INIT_LEN = 10;
  localparam int unsigned LAD_LEN  = 15;
  localparam int unsigned RECA_LEN = 12;
  localparam int unsigned RECC_LEN = 8;
  localparam logic [NB-1:0] NVEC = NB'(N);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_KEY, S_LADDER, S_DRAIN, S_RECA, S_INV, S_RECB, S_RECC,
    S_DONE
  } state_e;

  typedef enum logic [2:0] {
    PH_SQ, PH_MUL, PH_SQ1, PH_MULA, PH_FINAL, PH_END
  } inv_phase_e;

  function automatic uop_t mk(alu_op_e op, asel_e as, reg_addr_e ra,
                              reg_addr_e rb, reg_addr_e rd);
    return '{op: op, asel: as, ra: ra, rb: rb, rd: rd};
  endfunction

  // Step 1: affine to projective.
  function automatic uop_t init_rom(int unsigned pc);
    case (pc)
      0:       return mk(OP_ADD, A_RF, R_T4, R_T4, R_T4);  // T4 = 0
      2:       return mk(OP_ADD, A_XP, R_X1, R_T4, R_Z1);  // Z1 = xp
      4:       return mk(OP_MUL, A_XP, R_X1, R_Z1, R_X1);  // X1 = xp^2
      5:       return mk(OP_MUL, A_XP, R_X1, R_Z1, R_Z2);  // Z2 = xp^2
      6:       return mk(OP_MUL, A_RF, R_X1, R_X1, R_X2);  // X2 = xp^4
      8:       return mk(OP_ADD, A_B,  R_X1, R_X2, R_X2);  // X2 = xp^4 + b
      default: return UOP_NOP;
    endcase
  endfunction

  // Step 2: rescheduled point addition and doubling, one issue slot each.
  function automatic uop_t ladder_rom(int unsigned pc);
    case (pc)
      0:       return mk(OP_MUL, A_RF, R_X2, R_Z1, R_Z1);  // inst1  Z1 = X2*Z1
      1:       return mk(OP_MUL, A_RF, R_X1, R_Z2, R_X1);  // inst2  X1 = X1*Z2
      2:       return mk(OP_MUL, A_RF, R_X2, R_X2, R_X2);  // inst11 X2 = X2^2
      3:       return mk(OP_ADD, A_RF, R_X1, R_Z1, R_T1);  // inst3  T1 = X1+Z1
      4:       return mk(OP_MUL, A_RF, R_X1, R_Z1, R_X1);  // inst4  X1 = X1*Z1
      5:       return mk(OP_MUL, A_RF, R_T1, R_T1, R_Z1);  // inst5  Z1 = T1^2
      6:       return mk(OP_MUL, A_RF, R_Z2, R_Z2, R_Z2);  // inst8  Z2 = Z2^2
      7:       return mk(OP_MUL, A_XP, R_X1, R_Z1, R_T1);  // inst6  T1 = xp*Z1
      8:       return mk(OP_MUL, A_RF, R_Z2, R_Z2, R_T2);  // inst9  T2 = Z2^2
      9:       return mk(OP_ADD, A_RF, R_X1, R_T1, R_X1);  // inst7  X1 = X1+T1
      10:      return mk(OP_MUL, A_B,  R_X1, R_T2, R_T2);  // inst10 T2 = b*T2
      11:      return mk(OP_MUL, A_RF, R_X2, R_Z2, R_Z2);  // inst12 Z2 = X2*Z2
      12:      return mk(OP_MUL, A_RF, R_X2, R_X2, R_X2);  // inst13 X2 = X2^2
      14:      return mk(OP_ADD, A_RF, R_X2, R_T2, R_X2);  // inst14 X2 = X2+T2
      default: return UOP_NOP;                           // slot 13: bubble
    endcase
  endfunction

  // Step 3a: numerator terms and x*Z1*Z2.
  function automatic uop_t reca_rom(int unsigned pc);
    case (pc)
      0:       return mk(OP_MUL, A_XP, R_X1, R_Z1, R_T1);  // T1 = x*Z1
      1:       return mk(OP_MUL, A_XP, R_X1, R_Z2, R_T2);  // T2 = x*Z2
      2:       return mk(OP_MUL, A_RF, R_Z1, R_Z2, R_T3);  // T3 = Z1*Z2
      3:       return mk(OP_ADD, A_RF, R_X1, R_T1, R_T1);  // T1 = X1 + x*Z1
      4:       return mk(OP_ADD, A_RF, R_X2, R_T2, R_T2);  // T2 = X2 + x*Z2
      5:       return mk(OP_MUL, A_XP, R_X1, R_T3, R_T4);  // T4 = x*Z1*Z2
      6:       return mk(OP_MUL, A_RF, R_T1, R_T2, R_T1);  // T1 = product
      7:       return mk(OP_MUL, A_YP, R_X1, R_T3, R_X2);  // X2 = y*Z1*Z2
      8:       return mk(OP_MUL, A_XP, R_X1, R_T4, R_Z2);  // Z2 = x^2*Z1*Z2
      9:       return mk(OP_ADD, A_RF, R_T1, R_X2, R_T1);  // T1 += X2
      11:      return mk(OP_ADD, A_RF, R_T1, R_Z2, R_T1);  // T1 += Z2  (= U)
      default: return UOP_NOP;
    endcase
  endfunction

  // Step 3c: yq = (xp + xq) * U * (x*Z1*Z2)^-1 + yp, into Z1.
  function automatic uop_t recc_rom(int unsigned pc);
    case (pc)
      0:       return mk(OP_ADD, A_XP, R_X1, R_X1, R_Z1);  // Z1 = xp + xq
      2:       return mk(OP_MUL, A_RF, R_T1, R_Z1, R_Z1);  // Z1 *= U
      4:       return mk(OP_MUL, A_RF, R_T3, R_Z1, R_Z1);  // Z1 *= W
      6:       return mk(OP_ADD, A_YP, R_X1, R_Z1, R_Z1);  // Z1 += yp
      default: return UOP_NOP;
    endcase
  endfunction

  // ---------------------------------------------------------------------
  state_e      state;
  logic [4:0]  pc;
  logic [$clog2(M)-1:0] bit_idx;   // key bit being processed
  logic        swap;               // inspected key bit was 0
  logic        second_inv;         // working on the second inversion

  // inversion engine state
  inv_phase_e  ph;
  logic        inv_wait;           // no-op slot after each inversion op
  reg_addr_e   inv_a, inv_p, inv_q, inv_dst, cur;
  logic [NB-1:0] kexp;             // exponent count of the current beta
  logic [NB-1:0] sq_cnt;
  logic [$clog2(NB)-1:0] bi;       // chain bit being processed

  reg_addr_e   other;
  always_comb other = (cur == inv_p) ? inv_q : inv_p;

  // Instruction issued in the current cycle.
  always_comb begin
    uop = UOP_NOP;
    unique case (state)
      S_INIT:   uop = init_rom(32'(pc));
      S_LADDER: begin
        uop    = ladder_rom(32'(pc));
        uop.ra = ladder_swap(uop.ra, swap);
        uop.rb = ladder_swap(uop.rb, swap);
        uop.rd = ladder_swap(uop.rd, swap);
      end
      S_RECA:   uop = reca_rom(32'(pc));
      S_RECB:   uop = mk(OP_MUL, A_RF, R_X1, R_T2, R_X1);  // xq = X1 * Z1^-1
      S_RECC:   uop = recc_rom(32'(pc));
      S_INV: if (!inv_wait) begin
        unique case (ph)
          PH_SQ:    uop = (sq_cnt == '0) ? mk(OP_MUL, A_RF, cur, cur, other)
                                         : mk(OP_MUL, A_RF, other, other, other);
          PH_MUL:   uop = mk(OP_MUL, A_RF, other, cur, other);
          PH_SQ1:   uop = mk(OP_MUL, A_RF, cur, cur, cur);
          PH_MULA:  uop = mk(OP_MUL, A_RF, cur, inv_a, cur);
          PH_FINAL: uop = mk(OP_MUL, A_RF, cur, cur, inv_dst);
          default:  uop = UOP_NOP;
        endcase
      end
      default:  uop = UOP_NOP;
    endcase
  end

  always_comb begin
    busy = (state != S_IDLE);
    done = (state == S_DONE);
  end

  // Set up the inversion engine for input a, scratch p/q, result dst.
  task automatic inv_setup(input reg_addr_e a, input reg_addr_e p,
                           input reg_addr_e q, input reg_addr_e dst);
    inv_a    <= a;
    inv_p    <= p;
    inv_q    <= q;
    inv_dst  <= dst;
    cur      <= a;
    kexp     <= NB'(1);
    sq_cnt   <= '0;
    bi       <= $clog2(NB)'(NB - 2);
    ph       <= PH_SQ;
    inv_wait <= 1'b0;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pc         <= '0;
      bit_idx    <= '0;
      swap       <= 1'b0;
      second_inv <= 1'b0;
      ph         <= PH_SQ;
      inv_wait   <= 1'b0;
      inv_a      <= R_Z1;
      inv_p      <= R_T2;
      inv_q      <= R_T3;
      inv_dst    <= R_T2;
      cur        <= R_Z1;
      kexp       <= '0;
      sq_cnt     <= '0;
      bi         <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_INIT;
          pc    <= '0;
        end
        S_INIT: begin
          if (pc == 5'(INIT_LEN - 1)) begin
            state   <= S_KEY;
            bit_idx <= $clog2(M)'(M - 2);
          end
          pc <= (pc == 5'(INIT_LEN - 1)) ? '0 : pc + 5'd1;
        end
        S_KEY: begin
          swap  <= ~k[bit_idx];
          state <= S_LADDER;
          pc    <= '0;
        end
        S_LADDER: begin
          if (pc == 5'(LAD_LEN - 1)) state <= S_DRAIN;
          pc <= (pc == 5'(LAD_LEN - 1)) ? '0 : pc + 5'd1;
        end
        S_DRAIN: begin
          if (bit_idx == '0) begin
            state <= S_RECA;
          end else begin
            bit_idx <= bit_idx - 1'b1;
            state   <= S_KEY;
          end
          pc <= '0;
        end
        S_RECA: begin
          if (pc == 5'(RECA_LEN - 1)) begin
            state      <= S_INV;
            second_inv <= 1'b0;
            inv_setup(R_Z1, R_T2, R_T3, R_T2);
          end
          pc <= (pc == 5'(RECA_LEN - 1)) ? '0 : pc + 5'd1;
        end
        S_INV: begin
          inv_wait <= ~inv_wait;
          if (!inv_wait) begin
            unique case (ph)
              PH_SQ: begin
                if (sq_cnt == kexp - 1'b1) begin
                  sq_cnt <= '0;
                  ph     <= PH_MUL;
                end else begin
                  sq_cnt <= sq_cnt + 1'b1;
                end
              end
              PH_MUL: begin
                cur  <= other;
                kexp <= kexp << 1;
                if (NVEC[bi]) ph <= PH_SQ1;
                else if (bi == '0) ph <= PH_FINAL;
                else begin
                  bi <= bi - 1'b1;
                  ph <= PH_SQ;
                end
              end
              PH_SQ1: ph <= PH_MULA;
              PH_MULA: begin
                kexp <= kexp + 1'b1;
                if (bi == '0) ph <= PH_FINAL;
                else begin
                  bi <= bi - 1'b1;
                  ph <= PH_SQ;
                end
              end
              // the final square is written back in the no-op cycle that
              // follows, before the next step reads it
              PH_FINAL: ph <= PH_END;
              default:  ph <= PH_END;
            endcase
          end else if (ph == PH_END) begin
            state <= second_inv ? S_RECC : S_RECB;
            pc    <= '0;
          end
        end
        S_RECB: begin
          state      <= S_INV;
          second_inv <= 1'b1;
          inv_setup(R_T4, R_T3, R_Z2, R_T3);
        end
        S_RECC: begin
          if (pc == 5'(RECC_LEN - 1)) state <= S_DONE;
          pc <= (pc == 5'(RECC_LEN - 1)) ? '0 : pc + 5'd1;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  if (!nist_m_ok(M)) begin : g_bad_m
    $error("ecc_cu: M must be a NIST binary field size");
  end
endmodule

// pn_ctrl: prototypical-network sequencer of one CiM array.
//
// Runs the two in-memory operations of prototypical-network inference on
// vectors stored in the array: floating-point vectors by default (each
// element a mantissa row and an exponent row, see flp_seq), or fixed-point
// vectors when fix_pt is set (see below). A vector element lives in a "slot":
// slot s is rows 2s (mantissa) and 2s+1 (exponent).
//
// CMD_MEAN (iM-Mean, class prototype): for each of the D elements, the K
// support vectors (K = 2**k_log2, stored one after another from src_slot,
// support s element j in slot src_slot + s*D + j) are accumulated into
// dst_slot + j by repeated floating-point adds (iM accumulate: add, then
// write in place). Dividing by K is then a subtraction of k_log2 from the
// exponent: k_log2 is written into a scratch row through the bitline
// drivers, and the exponent becomes e + NOT(k_log2) + 1.
//
// CMD_NN (iM-NearestNeighbor): for each of C prototypes (stored one after
// another from src_slot, prototype c element j in slot src_slot + c*D + j)
// the Manhattan distance to the query (dst_slot + j) is formed element by
// element: floating-point subtract query - prototype, then accumulate its
// absolute value (NOT and carry-in 1 when negative). Each distance is
// compared with the best so far by a floating-point subtraction whose
// mantissa sign decides; ties keep the lower class. class_idx gives the
// nearest class and the best distance stays in the BEST slot.
//
// Fixed point (fix_pt = 1): each element is one N-bit two's-complement
// row and the slot fields count rows. MEAN accumulates the K supports with
// in-memory add-and-write and divides by a right shift of k_log2 bits while
// reading; the shifter fills with zeros, so a negative sum is shifted as
// NOT, shift, NOT (an arithmetic shift, rounding towards minus infinity).
// NN forms q - p as NOT p, write, ADD with carry-in 1; a negative
// difference is inverted and accumulated with carry-in 1, a positive one
// accumulated as it is. The distance is compared with the best by the same
// subtraction. Sums must stay within N bits: nothing detects overflow.
//
// Scratch rows: the top 14 rows (M-14 .. M-1) belong to the sequencer
// (ACC, BEST, CMP and DIFF slots, the constant rows M-6 and M-5, and the
// flp_seq rows M-5 .. M-1; row M-5 is shared, the two never use it at the
// same time); user data must stay below row M-14. Every floating-point
// result is normalised by flp_seq; the first support copied in by MEAN is
// taken as written.
//
// Handshake: start is taken when busy is low; busy stays high until done
// pulses for one cycle. While busy the sequencer owns the array (uop,
// data_in). err is set at done if the command was unknown or a count was
// zero, and the command is then not run.
//
// From the published method: the mean as an accumulation followed by an
// exponent subtraction (floating point) or a right shift (fixed point) for
// power-of-two shot counts; the Manhattan distance as subtraction, NOT with
// carry-in 1 for a negative difference, and accumulation; the minimum
// search by subtraction. This design's own: the command set and encoding,
// the data layout (slots and rows), the scratch rows, the tie rule, the
// fixed-point format and the err flag.
module pn_ctrl
  import cim_pkg::*;
#(
  parameter int unsigned M  = CIM_M,
  parameter int unsigned N  = CIM_N,
  parameter int unsigned CW = 8            // width of counts and slot numbers
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [1:0]        cmd,
  input  logic              fix_pt,        // 1: fixed-point data, one row per element
  input  logic [CW-1:0]     src_slot,      // MEAN: first support; NN: first prototype
  input  logic [CW-1:0]     dst_slot,      // MEAN: prototype out; NN: query
  input  logic [CW-1:0]     dim,           // D, elements per vector
  input  logic [CW-1:0]     count,         // NN: C prototypes (MEAN: unused)
  input  logic [4:0]        k_log2,        // MEAN: log2 of the shots K
  output cim_uop_t          uop,
  output logic [N-1:0]      data_in,
  input  logic [N-1:0]      arr_out,
  output logic              busy,
  output logic              done,
  output logic              err,
  output logic [CW-1:0]     class_idx
);
  localparam logic [1:0] CMD_MEAN = 2'd1, CMD_NN = 2'd2;
  localparam logic [1:0] MODE_ADD = 2'd0, MODE_SUB = 2'd1, MODE_ABSADD = 2'd2;

  // scratch rows
  localparam int unsigned R_ACC  = M - 14;
  localparam int unsigned R_BEST = M - 12;
  localparam int unsigned R_CMP  = M - 10;
  localparam int unsigned R_DIFF = M - 8;
  localparam int unsigned R_K    = M - 6;
  localparam int unsigned R_NOTK = M - 5;

  typedef enum logic [5:0] {
    C_IDLE,
    // MEAN
    M_ELEM, M_RDM, M_WRM, M_RDE, M_WRE, M_ACC, M_ACCW,
    M_WK, M_NK, M_WNK, M_SUBE, M_WE,
    // NN
    N_DIFF, N_DIFFW, N_Z, N_RDE, N_WRE, N_ABS, N_ABSW, N_CLS,
    N_CMP, N_CMPW, N_RDS, N_SCHK, N_BRDM, N_BWRM, N_BRDE, N_BWRE,
    // fixed-point MEAN
    P_ELEM, P_RD0, P_WR0, P_ADD, P_WADD, P_SH, P_NSH, P_WT, P_N2, P_WSH,
    // fixed-point NN
    Q_Z, Q_NP, Q_WNP, Q_SUB, Q_WD, Q_ND, Q_WND, Q_ACC, Q_WACC,
    Q_NB, Q_WNB, Q_CMP, Q_CHK, Q_BRD, Q_BWR,
    C_DONE
  } state_e;

  state_e              st;
  logic [1:0]          r_cmd;
  logic [CW-1:0]       r_src, r_dst, r_dim, r_cnt;
  logic [4:0]          r_k;
  logic [CW-1:0]       j, c, s;              // element, class, shot counters
  logic [CW-1:0]       best;
  logic                neg;                  // fixed point: difference was negative

  // flp_seq connection
  logic              f_start, f_busy, f_done;
  logic [1:0]        f_mode;
  logic [ROW_AW-1:0] f_am, f_ae, f_bm, f_be, f_dm, f_de;
  cim_uop_t          f_uop, c_uop;
  logic [N-1:0]      f_din, c_din;

  flp_seq #(.M(M), .N(N)) u_flp (
    .clk(clk), .rst_n(rst_n), .start(f_start), .mode(f_mode),
    .a_m(f_am), .a_e(f_ae), .b_m(f_bm), .b_e(f_be), .d_m(f_dm), .d_e(f_de),
    .uop(f_uop), .data_in(f_din), .arr_out(arr_out), .busy(f_busy), .done(f_done)
  );

  // row of the mantissa of a slot
  function automatic logic [ROW_AW-1:0] mrow(input logic [CW-1:0] slot);
    return ROW_AW'({slot, 1'b0});
  endfunction
  function automatic logic [ROW_AW-1:0] erow(input logic [CW-1:0] slot);
    return ROW_AW'({slot, 1'b1});
  endfunction

  // slots of the current support / prototype / output elements
  logic [CW-1:0] sup_slot, out_slot, pro_slot, q_slot;
  always_comb begin
    sup_slot = CW'(r_src + s * r_dim + j);
    out_slot = CW'(r_dst + j);
    pro_slot = CW'(r_src + c * r_dim + j);
    q_slot   = CW'(r_dst + j);
  end

  // fixed-point rows: one element per row, the slot fields count rows
  logic [ROW_AW-1:0] x_sup, x_out, x_pro, x_q;
  always_comb begin
    x_sup = ROW_AW'(r_src + s * r_dim + j);
    x_out = ROW_AW'(r_dst + j);
    x_pro = ROW_AW'(r_src + c * r_dim + j);
    x_q   = ROW_AW'(r_dst + j);
  end

  // flp_seq operands for each calling state
  always_comb begin
    f_start = 1'b0;
    f_mode  = MODE_ADD;
    f_am = '0; f_ae = '0; f_bm = '0; f_be = '0; f_dm = '0; f_de = '0;
    unique case (st)
      M_ACC: begin
        f_start = 1'b1;
        f_mode = MODE_ADD;
        f_am = mrow(out_slot); f_ae = erow(out_slot);
        f_bm = mrow(sup_slot); f_be = erow(sup_slot);
        f_dm = mrow(out_slot); f_de = erow(out_slot);
      end
      N_DIFF: begin
        f_start = 1'b1;
        f_mode = MODE_SUB;
        f_am = mrow(q_slot);   f_ae = erow(q_slot);
        f_bm = mrow(pro_slot); f_be = erow(pro_slot);
        f_dm = ROW_AW'(R_DIFF);     f_de = ROW_AW'(R_DIFF + 1);
      end
      N_ABS: begin
        f_start = 1'b1;
        f_mode = MODE_ABSADD;
        f_am = ROW_AW'(R_ACC);  f_ae = ROW_AW'(R_ACC + 1);
        f_bm = ROW_AW'(R_DIFF); f_be = ROW_AW'(R_DIFF + 1);
        f_dm = ROW_AW'(R_ACC);  f_de = ROW_AW'(R_ACC + 1);
      end
      N_CMP: begin
        f_start = 1'b1;
        f_mode = MODE_SUB;
        f_am = ROW_AW'(R_ACC);  f_ae = ROW_AW'(R_ACC + 1);
        f_bm = ROW_AW'(R_BEST); f_be = ROW_AW'(R_BEST + 1);
        f_dm = ROW_AW'(R_CMP);  f_de = ROW_AW'(R_CMP + 1);
      end
      default: ;
    endcase
  end

  // array micro-operations issued by this sequencer itself
  always_comb begin
    c_uop = uop_nop();
    c_din = '0;
    unique case (st)
      M_RDM:  c_uop = uop_rd(OP_OR, mrow(sup_slot), 1'b0, '0, 1'b0, MASK_NONE);
      M_WRM:  c_uop = uop_wr(mrow(out_slot), 1'b0);
      M_RDE:  c_uop = uop_rd(OP_OR, erow(sup_slot), 1'b0, '0, 1'b0, MASK_NONE);
      M_WRE:  c_uop = uop_wr(erow(out_slot), 1'b0);
      M_WK: begin
        c_uop   = uop_wr(ROW_AW'(R_K), 1'b1);
        c_din   = N'(r_k);
      end
      M_NK:   c_uop = uop_rd(OP_NOR, ROW_AW'(R_K), 1'b0, '0, 1'b0, MASK_NONE);
      M_WNK:  c_uop = uop_wr(ROW_AW'(R_NOTK), 1'b0);
      M_SUBE: c_uop = uop_rd(OP_ADD, erow(out_slot), 1'b1, ROW_AW'(R_NOTK), 1'b1, MASK_NONE);
      M_WE:   c_uop = uop_wr(erow(out_slot), 1'b0);
      N_Z: begin
        c_uop   = uop_wr(ROW_AW'(R_ACC), 1'b1);   // accumulator mantissa = 0
        c_din   = '0;
      end
      N_RDE:  c_uop = uop_rd(OP_OR, ROW_AW'(R_DIFF + 1), 1'b0, '0, 1'b0, MASK_NONE);
      N_WRE:  c_uop = uop_wr(ROW_AW'(R_ACC + 1), 1'b0);
      N_RDS:  c_uop = uop_rd(OP_OR, ROW_AW'(R_CMP), 1'b0, '0, 1'b0, MASK_NONE);
      N_BRDM: c_uop = uop_rd(OP_OR, ROW_AW'(R_ACC), 1'b0, '0, 1'b0, MASK_NONE);
      N_BWRM: c_uop = uop_wr(ROW_AW'(R_BEST), 1'b0);
      N_BRDE: c_uop = uop_rd(OP_OR, ROW_AW'(R_ACC + 1), 1'b0, '0, 1'b0, MASK_NONE);
      N_BWRE: c_uop = uop_wr(ROW_AW'(R_BEST + 1), 1'b0);
      // fixed-point MEAN
      P_RD0:  c_uop = uop_rd(OP_OR, x_sup, 1'b0, '0, 1'b0, MASK_NONE);
      P_WR0:  c_uop = uop_wr(x_out, 1'b0);
      P_ADD:  c_uop = uop_rd(OP_ADD, x_out, 1'b1, x_sup, 1'b0, MASK_NONE);
      P_WADD: c_uop = uop_wr(x_out, 1'b0);
      P_SH:   c_uop = uop_rd(OP_OR, x_out, 1'b0, '0, 1'b0, shift_mask(1'b0, r_k));
      P_NSH:  c_uop = uop_rd(OP_NOR, x_out, 1'b0, '0, 1'b0, shift_mask(1'b0, r_k));
      P_WT:   c_uop = uop_wr(ROW_AW'(R_DIFF), 1'b0);
      P_N2:   c_uop = uop_rd(OP_NOR, ROW_AW'(R_DIFF), 1'b0, '0, 1'b0, MASK_NONE);
      P_WSH:  c_uop = uop_wr(x_out, 1'b0);
      // fixed-point NN
      Q_Z: begin
        c_uop   = uop_wr(ROW_AW'(R_ACC), 1'b1);
        c_din   = '0;
      end
      Q_NP:   c_uop = uop_rd(OP_NOR, x_pro, 1'b0, '0, 1'b0, MASK_NONE);
      Q_WNP:  c_uop = uop_wr(ROW_AW'(R_DIFF), 1'b0);
      Q_SUB:  c_uop = uop_rd(OP_ADD, x_q, 1'b1, ROW_AW'(R_DIFF), 1'b1, MASK_NONE);
      Q_WD:   c_uop = uop_wr(ROW_AW'(R_DIFF), 1'b0);
      Q_ND:   c_uop = uop_rd(OP_NOR, ROW_AW'(R_DIFF), 1'b0, '0, 1'b0, MASK_NONE);
      Q_WND:  c_uop = uop_wr(ROW_AW'(R_DIFF), 1'b0);
      Q_ACC:  c_uop = uop_rd(OP_ADD, ROW_AW'(R_ACC), 1'b1, ROW_AW'(R_DIFF), neg, MASK_NONE);
      Q_WACC: c_uop = uop_wr(ROW_AW'(R_ACC), 1'b0);
      Q_NB:   c_uop = uop_rd(OP_NOR, ROW_AW'(R_BEST), 1'b0, '0, 1'b0, MASK_NONE);
      Q_WNB:  c_uop = uop_wr(ROW_AW'(R_CMP), 1'b0);
      Q_CMP:  c_uop = uop_rd(OP_ADD, ROW_AW'(R_ACC), 1'b1, ROW_AW'(R_CMP), 1'b1, MASK_NONE);
      Q_BRD:  c_uop = uop_rd(OP_OR, ROW_AW'(R_ACC), 1'b0, '0, 1'b0, MASK_NONE);
      Q_BWR:  c_uop = uop_wr(ROW_AW'(R_BEST), 1'b0);
      default: ;
    endcase
  end

  assign uop     = f_busy ? f_uop : c_uop;
  assign data_in = f_busy ? f_din : c_din;
  assign busy = (st != C_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= C_IDLE;
      done      <= 1'b0;
      err       <= 1'b0;
      class_idx <= '0;
      r_cmd     <= '0;
      {r_src, r_dst, r_dim, r_cnt} <= '0;
      r_k       <= '0;
      j         <= '0;
      c         <= '0;
      s         <= '0;
      best      <= '0;
      neg       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          r_cmd <= cmd;
          r_src <= src_slot;
          r_dst <= dst_slot;
          r_dim <= dim;
          r_cnt <= count;
          r_k   <= k_log2;
          j     <= '0;
          c     <= '0;
          s     <= '0;
          err   <= 1'b0;
          if (cmd == CMD_MEAN && dim != '0)
            st <= fix_pt ? P_ELEM : M_ELEM;
          else if (cmd == CMD_NN && dim != '0 && count != '0)
            st <= fix_pt ? Q_Z : N_DIFF;
          else begin
            err <= 1'b1;
            st  <= C_DONE;
          end
        end

        // ---- iM-Mean: copy support 0, accumulate the others, divide ----
        M_ELEM: begin
          s  <= '0;
          st <= M_RDM;
        end
        M_RDM: st <= M_WRM;
        M_WRM: st <= M_RDE;
        M_RDE: st <= M_WRE;
        M_WRE: begin
          s  <= CW'(1);
          st <= (r_k == '0) ? M_WK : M_ACC;
        end
        M_ACC:  st <= M_ACCW;               // flp_seq starts here
        M_ACCW: if (f_done) begin
          if (32'(s) == (32'd1 << r_k) - 1) st <= M_WK;
          else begin
            s  <= s + CW'(1);
            st <= M_ACC;
          end
        end
        M_WK:   st <= M_NK;
        M_NK:   st <= M_WNK;
        M_WNK:  st <= M_SUBE;
        M_SUBE: st <= M_WE;
        M_WE: begin
          if (j == r_dim - CW'(1)) st <= C_DONE;
          else begin
            j  <= j + CW'(1);
            st <= M_ELEM;
          end
        end

        // ---- iM-NearestNeighbor ----
        N_DIFF:  st <= N_DIFFW;
        N_DIFFW: if (f_done) st <= (j == '0) ? N_Z : N_ABS;
        N_Z:     st <= N_RDE;
        N_RDE:   st <= N_WRE;
        N_WRE:   st <= N_ABS;
        N_ABS:   st <= N_ABSW;
        N_ABSW: if (f_done) begin
          if (j == r_dim - CW'(1)) begin
            j  <= '0;
            st <= N_CLS;
          end else begin
            j  <= j + CW'(1);
            st <= N_DIFF;
          end
        end
        N_CLS: st <= (c == '0) ? N_BRDM : N_CMP;
        N_CMP:  st <= N_CMPW;
        N_CMPW: if (f_done) st <= N_RDS;
        N_RDS:  st <= N_SCHK;
        N_SCHK: begin
          if (arr_out[N-1]) st <= N_BRDM;     // distance < best
          else if (c == r_cnt - CW'(1)) st <= C_DONE;
          else begin
            c  <= c + CW'(1);
            st <= N_DIFF;
          end
        end
        N_BRDM: st <= N_BWRM;
        N_BWRM: st <= N_BRDE;
        N_BRDE: st <= N_BWRE;
        N_BWRE: begin
          best <= c;
          if (c == r_cnt - CW'(1)) st <= C_DONE;
          else begin
            c  <= c + CW'(1);
            st <= N_DIFF;
          end
        end

        // ---- fixed-point iM-Mean: accumulate, then shift right by k ----
        P_ELEM: begin
          s  <= '0;
          st <= P_RD0;
        end
        P_RD0: st <= P_WR0;
        P_WR0: begin
          s  <= CW'(1);
          st <= (r_k == '0) ? P_WSH : P_ADD;   // K = 1: the copy is the mean
        end
        P_ADD:  st <= P_WADD;
        P_WADD: begin
          // OUT still holds the sum just written: its sign picks the shift
          if (32'(s) == (32'd1 << r_k) - 1) st <= arr_out[N-1] ? P_NSH : P_SH;
          else begin
            s  <= s + CW'(1);
            st <= P_ADD;
          end
        end
        P_SH:  st <= P_WSH;                    // non-negative: logical shift
        P_NSH: st <= P_WT;                     // negative: NOT, shift, NOT
        P_WT:  st <= P_N2;
        P_N2:  st <= P_WSH;
        P_WSH: begin
          if (j == r_dim - CW'(1)) st <= C_DONE;
          else begin
            j  <= j + CW'(1);
            st <= P_ELEM;
          end
        end

        // ---- fixed-point iM-NearestNeighbor ----
        Q_Z:   st <= Q_NP;                     // accumulator = 0
        Q_NP:  st <= Q_WNP;
        Q_WNP: st <= Q_SUB;
        Q_SUB: st <= Q_WD;
        Q_WD: begin                            // OUT holds q - p
          neg <= arr_out[N-1];
          st  <= arr_out[N-1] ? Q_ND : Q_ACC;
        end
        Q_ND:  st <= Q_WND;
        Q_WND: st <= Q_ACC;
        Q_ACC: st <= Q_WACC;
        Q_WACC: begin
          if (j != r_dim - CW'(1)) begin
            j  <= j + CW'(1);
            st <= Q_NP;
          end else begin
            j  <= '0;
            st <= (c == '0) ? Q_BRD : Q_NB;
          end
        end
        Q_NB:  st <= Q_WNB;
        Q_WNB: st <= Q_CMP;
        Q_CMP: st <= Q_CHK;
        Q_CHK: begin                           // OUT holds distance - best
          if (arr_out[N-1]) st <= Q_BRD;
          else if (c == r_cnt - CW'(1)) st <= C_DONE;
          else begin
            c  <= c + CW'(1);
            st <= Q_Z;
          end
        end
        Q_BRD: st <= Q_BWR;
        Q_BWR: begin
          best <= c;
          if (c == r_cnt - CW'(1)) st <= C_DONE;
          else begin
            c  <= c + CW'(1);
            st <= Q_Z;
          end
        end

        C_DONE: begin
          if (r_cmd == CMD_NN) class_idx <= best;
          done <= 1'b1;
          st   <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  // The sequencer never issues its own operation while flp_seq runs.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 f_busy |-> !(c_uop.rd || c_uop.wr));
endmodule

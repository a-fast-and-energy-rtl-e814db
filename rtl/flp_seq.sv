// flp_seq: floating-point add / subtract sequencer for one CiM array.
//
// Numbers are held in memory as two rows: an N-bit two's-complement
// mantissa and an N-bit two's-complement exponent, value = m * 2**e. A
// normalised number has its most significant magnitude bit (the highest
// bit that differs from the sign bit) at position MANT_W-2, i.e.
// 2**(MANT_W-2) <= |m| < 2**(MANT_W-1) for positive m; the N-MANT_W bits
// above are headroom for alignment shifts.
//
// An operation runs entirely as array micro-operations (one per clock):
//  1. Exponent difference: ea - eb is formed in memory (NOT eb, write, ADD
//     with carry-in 1); when negative, eb - ea is formed the same way. Its
//     magnitude d is the alignment shift.
//  2. Alignment, as published: the mantissa of the number with the LARGER
//     exponent is shifted LEFT by d through the shifter (in passes of at
//     most 31, written back through the copy buffers) and the common
//     exponent is the smaller one. Own addition: when d exceeds the
//     headroom N-MANT_W, the larger mantissa is shifted left only by the
//     headroom and the smaller mantissa is shifted RIGHT arithmetically by
//     the rest (a negative one as NOT, logical shift, NOT), so nothing
//     overflows; the common
//     exponent is then e_large - headroom, formed by writing the headroom as
//     a constant through the bitline drivers and subtracting it in memory.
//  3. Mantissa combine:
//       MODE_ADD    D = A + B      ADD
//       MODE_SUB    D = A - B      NOT B, write, ADD with carry-in 1
//       MODE_ABSADD D = A + |B|    READ B for its sign; if negative as SUB
//  4. Normalisation: the result mantissa is read, the sequencer finds its
//     leading magnitude bit, shifts the mantissa in place (left, or
//     arithmetically right with truncation towards minus infinity) so that
//     bit lands at MANT_W-2, and corrects the exponent by the shift amount
//     with an in-memory add or subtract of a constant. A zero mantissa is
//     left as it is.
// D may be the same rows as A (accumulate).
//
// Interface: start (while busy is low) takes mode and the six row numbers;
// busy is high until done pulses for one cycle after D's exponent is
// written. uop/data_in drive the array; arr_out is the array's OUT, looked
// at one cycle after the read that produced it. Scratch rows T_NOT, T_A,
// T_B, T_E and T_K (by default rows M-1 .. M-5) must not hold A, B or D.
//
// Design choices beyond the published description: the number format and
// MANT_W, the large-gap rule in step 2, the normalisation target, and that
// alignment amounts above 2N are clamped to 2N (the smaller mantissa then
// becomes 0 or -1).
module flp_seq
  import cim_pkg::*;
#(
  parameter int unsigned M      = CIM_M,
  parameter int unsigned N      = CIM_N,
  parameter int unsigned MANT_W = 32,
  parameter int unsigned T_NOT  = M - 1,
  parameter int unsigned T_A    = M - 2,
  parameter int unsigned T_B    = M - 3,
  parameter int unsigned T_E    = M - 4,
  parameter int unsigned T_K    = M - 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [1:0]        mode,
  input  logic [ROW_AW-1:0] a_m,
  input  logic [ROW_AW-1:0] a_e,
  input  logic [ROW_AW-1:0] b_m,
  input  logic [ROW_AW-1:0] b_e,
  input  logic [ROW_AW-1:0] d_m,
  input  logic [ROW_AW-1:0] d_e,
  output cim_uop_t          uop,
  output logic [N-1:0]      data_in,
  input  logic [N-1:0]      arr_out,
  output logic              busy,
  output logic              done
);
  localparam logic [1:0] MODE_ADD = 2'd0, MODE_SUB = 2'd1, MODE_ABSADD = 2'd2;
  localparam logic [ROW_AW-1:0] R_NOT = ROW_AW'(T_NOT);
  localparam logic [ROW_AW-1:0] R_A   = ROW_AW'(T_A);
  localparam logic [ROW_AW-1:0] R_B   = ROW_AW'(T_B);
  localparam logic [ROW_AW-1:0] R_E   = ROW_AW'(T_E);
  localparam logic [ROW_AW-1:0] R_K   = ROW_AW'(T_K);
  localparam int unsigned AMW  = 16;                 // shift amount width
  localparam logic [AMW-1:0] HEAD = AMW'(N - MANT_W); // alignment headroom
  localparam logic [AMW-1:0] TOP  = AMW'(MANT_W - 2); // normalised leading bit

  typedef enum logic [5:0] {
    S_IDLE,
    // exponent difference
    S_NEB, S_WNEB, S_DIFF, S_DCHK, S_NEA, S_WNEA, S_DIFF2, S_D2CHK,
    // common exponent
    S_CPE, S_WCPE, S_HK, S_HNK, S_HWNK, S_HSUB, S_HWE,
    // alignment
    S_ALIGN_L, S_ALIGN_R,
    // mantissa combine
    S_COMB, S_RDB, S_BCHK, S_NB, S_WNB, S_MADD, S_WM,
    // normalisation
    S_NRD, S_NCHK, S_NSHIFT, S_XK, S_XN, S_XWN, S_XADD, S_XW, S_RE, S_WE,
    // shift subroutines (left logical, right arithmetic)
    L_SH, L_WSH,
    R_RD, R_CHK, R_PRE, R_WPRE, R_SH, R_WSH, R_POST, R_WPOST
  } state_e;

  state_e              st, ret;
  logic [1:0]          r_mode;
  logic [ROW_AW-1:0]   r_am, r_ae, r_bm, r_be, r_dm, r_de;
  logic [ROW_AW-1:0]   a_row, b_row;         // mantissa rows to combine
  logic                a_large;              // A has the larger exponent
  logic [AMW-1:0]      s1, s2;               // left shift of larger, right shift of smaller
  logic [ROW_AW-1:0]   sh_src, sh_dst;       // shift subroutine rows
  logic [AMW-1:0]      amt;                  // shift subroutine amount left to do
  logic                neg;                  // arithmetic right shift of a negative word
  logic [AMW-1:0]      kconst;               // constant written through the bitline drivers
  logic                ksub;                 // exponent correction subtracts kconst

  logic [4:0] step;
  assign step = (amt > AMW'(31)) ? 5'd31 : amt[4:0];

  // |v| of an exponent difference, clamped to 2N
  function automatic logic [AMW-1:0] clamp_amt(input logic [N-1:0] v);
    return (v > N'(2 * N)) ? AMW'(2 * N) : AMW'(v);
  endfunction

  // position of the highest bit that differs from the sign bit; -1 if none
  function automatic int lead_pos(input logic [N-1:0] v);
    int p;
    p = -1;
    for (int i = 0; i < N - 1; i++)
      if (v[i] != v[N-1]) p = i;
    return p;
  endfunction

  always_comb begin
    uop = uop_nop();
    data_in = '0;
    unique case (st)
      S_NEB:   uop = uop_rd(OP_NOR, r_be, 1'b0, '0, 1'b0, MASK_NONE);
      S_WNEB:  uop = uop_wr(R_NOT, 1'b0);
      S_DIFF:  uop = uop_rd(OP_ADD, r_ae, 1'b1, R_NOT, 1'b1, MASK_NONE);
      S_NEA:   uop = uop_rd(OP_NOR, r_ae, 1'b0, '0, 1'b0, MASK_NONE);
      S_WNEA:  uop = uop_wr(R_NOT, 1'b0);
      S_DIFF2: uop = uop_rd(OP_ADD, r_be, 1'b1, R_NOT, 1'b1, MASK_NONE);
      S_CPE:   uop = uop_rd(OP_OR, a_large ? r_be : r_ae, 1'b0, '0, 1'b0, MASK_NONE);
      S_WCPE:  uop = uop_wr(R_E, 1'b0);
      S_HK: begin
        uop = uop_wr(R_K, 1'b1);
        data_in = N'(HEAD);
      end
      S_HNK:   uop = uop_rd(OP_NOR, R_K, 1'b0, '0, 1'b0, MASK_NONE);
      S_HWNK:  uop = uop_wr(R_NOT, 1'b0);
      S_HSUB:  uop = uop_rd(OP_ADD, a_large ? r_ae : r_be, 1'b1, R_NOT, 1'b1, MASK_NONE);
      S_HWE:   uop = uop_wr(R_E, 1'b0);
      S_RDB:   uop = uop_rd(OP_OR, b_row, 1'b0, '0, 1'b0, MASK_NONE);
      S_NB:    uop = uop_rd(OP_NOR, b_row, 1'b0, '0, 1'b0, MASK_NONE);
      S_WNB:   uop = uop_wr(R_NOT, 1'b0);
      S_MADD:  uop = uop_rd(OP_ADD, a_row, 1'b1, b_row, 1'b0, MASK_NONE);
      S_WM:    uop = uop_wr(r_dm, 1'b0);
      S_NRD:   uop = uop_rd(OP_OR, r_dm, 1'b0, '0, 1'b0, MASK_NONE);
      S_XK: begin
        uop = uop_wr(R_K, 1'b1);
        data_in = N'(kconst);
      end
      S_XN:    uop = uop_rd(OP_NOR, R_K, 1'b0, '0, 1'b0, MASK_NONE);
      S_XWN:   uop = uop_wr(R_NOT, 1'b0);
      S_XADD:  uop = uop_rd(OP_ADD, R_E, 1'b1, ksub ? R_NOT : R_K, ksub, MASK_NONE);
      S_XW:    uop = uop_wr(r_de, 1'b0);
      S_RE:    uop = uop_rd(OP_OR, R_E, 1'b0, '0, 1'b0, MASK_NONE);
      S_WE:    uop = uop_wr(r_de, 1'b0);
      L_SH:    uop = uop_rd(OP_OR, sh_src, 1'b0, '0, 1'b0, shift_mask(1'b1, step));
      L_WSH:   uop = uop_wr(sh_dst, 1'b0);
      R_RD:    uop = uop_rd(OP_OR, sh_src, 1'b0, '0, 1'b0, MASK_NONE);
      R_PRE:   uop = uop_rd(neg ? OP_NOR : OP_OR, sh_src, 1'b0, '0, 1'b0, MASK_NONE);
      R_WPRE:  uop = uop_wr(sh_dst, 1'b0);
      R_SH:    uop = uop_rd(OP_OR, sh_dst, 1'b0, '0, 1'b0, shift_mask(1'b0, step));
      R_WSH:   uop = uop_wr(sh_dst, 1'b0);
      R_POST:  uop = uop_rd(neg ? OP_NOR : OP_OR, sh_dst, 1'b0, '0, 1'b0, MASK_NONE);
      R_WPOST: uop = uop_wr(sh_dst, 1'b0);
      default: uop = uop_nop();
    endcase
    // the subtraction path of the mantissa combine uses carry-in 1
    if (st == S_MADD && b_row == R_NOT) uop.cin = 1'b1;
  end

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      ret     <= S_IDLE;
      done    <= 1'b0;
      r_mode  <= MODE_ADD;
      {r_am, r_ae, r_bm, r_be, r_dm, r_de} <= '0;
      a_row   <= '0;
      b_row   <= '0;
      a_large <= 1'b0;
      s1      <= '0;
      s2      <= '0;
      sh_src  <= '0;
      sh_dst  <= '0;
      amt     <= '0;
      neg     <= 1'b0;
      kconst  <= '0;
      ksub    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          r_mode <= mode;
          r_am <= a_m; r_ae <= a_e; r_bm <= b_m; r_be <= b_e; r_dm <= d_m; r_de <= d_e;
          a_row <= a_m;
          b_row <= b_m;
          st <= S_NEB;
        end

        // ---- 1. exponent difference ----
        S_NEB:  st <= S_WNEB;
        S_WNEB: st <= S_DIFF;
        S_DIFF: st <= S_DCHK;
        S_DCHK: begin                              // arr_out = ea - eb
          if (arr_out[N-1]) st <= S_NEA;
          else begin
            a_large <= 1'b1;
            if (clamp_amt(arr_out) > HEAD) begin
              s1 <= HEAD;
              s2 <= clamp_amt(arr_out) - HEAD;
              st <= S_HK;
            end else begin
              s1 <= clamp_amt(arr_out);
              s2 <= '0;
              st <= S_CPE;
            end
          end
        end
        S_NEA:   st <= S_WNEA;
        S_WNEA:  st <= S_DIFF2;
        S_DIFF2: st <= S_D2CHK;
        S_D2CHK: begin                             // arr_out = eb - ea > 0
          a_large <= 1'b0;
          if (clamp_amt(arr_out) > HEAD) begin
            s1 <= HEAD;
            s2 <= clamp_amt(arr_out) - HEAD;
            st <= S_HK;
          end else begin
            s1 <= clamp_amt(arr_out);
            s2 <= '0;
            st <= S_CPE;
          end
        end

        // ---- common exponent ----
        S_CPE:  st <= S_WCPE;                       // smaller exponent
        S_WCPE: st <= S_ALIGN_L;
        S_HK:   st <= S_HNK;                        // larger exponent - headroom
        S_HNK:  st <= S_HWNK;
        S_HWNK: st <= S_HSUB;
        S_HSUB: st <= S_HWE;
        S_HWE:  st <= S_ALIGN_L;

        // ---- 2. alignment ----
        S_ALIGN_L: begin
          if (s1 != '0) begin
            sh_src <= a_large ? r_am : r_bm;
            sh_dst <= a_large ? R_A : R_B;
            if (a_large) a_row <= R_A;
            else         b_row <= R_B;
            amt    <= s1;
            ret    <= S_ALIGN_R;
            st     <= L_SH;
          end else st <= S_ALIGN_R;
        end
        S_ALIGN_R: begin
          if (s2 != '0) begin
            sh_src <= a_large ? r_bm : r_am;
            sh_dst <= a_large ? R_B : R_A;
            if (a_large) b_row <= R_B;
            else         a_row <= R_A;
            amt    <= (s2 > AMW'(N)) ? AMW'(N) : s2;
            ret    <= S_COMB;
            st     <= R_RD;
          end else st <= S_COMB;
        end

        // ---- 3. mantissa combine ----
        S_COMB: st <= (r_mode == MODE_ABSADD) ? S_RDB : (r_mode == MODE_SUB) ? S_NB : S_MADD;
        S_RDB:  st <= S_BCHK;
        S_BCHK: st <= arr_out[N-1] ? S_NB : S_MADD;
        S_NB:   st <= S_WNB;
        S_WNB: begin
          b_row <= R_NOT;
          st    <= S_MADD;
        end
        S_MADD: st <= S_WM;
        S_WM:   st <= S_NRD;

        // ---- 4. normalisation ----
        S_NRD:  st <= S_NCHK;
        S_NCHK: begin
          int p;
          p = lead_pos(arr_out);
          sh_src <= r_dm;
          sh_dst <= r_dm;
          if (arr_out == '0 || p == int'(TOP)) begin
            st <= S_RE;                              // nothing to do
          end else if (p < int'(TOP)) begin
            amt    <= AMW'(int'(TOP) - p);           // shift left, exponent down
            kconst <= AMW'(int'(TOP) - p);
            ksub   <= 1'b1;
            ret    <= S_XK;
            st     <= L_SH;
          end else begin
            amt    <= AMW'(p - int'(TOP));           // shift right, exponent up
            kconst <= AMW'(p - int'(TOP));
            ksub   <= 1'b0;
            ret    <= S_XK;
            st     <= R_RD;
          end
        end
        S_XK:   st <= ksub ? S_XN : S_XADD;
        S_XN:   st <= S_XWN;
        S_XWN:  st <= S_XADD;
        S_XADD: st <= S_XW;
        S_XW: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        S_RE:   st <= S_WE;
        S_WE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end

        // ---- left shift sh_src -> sh_dst by amt ----
        L_SH:  st <= L_WSH;
        L_WSH: begin
          amt    <= amt - AMW'(step);
          sh_src <= sh_dst;
          st     <= (amt == AMW'(step)) ? ret : L_SH;
        end

        // ---- arithmetic right shift sh_src -> sh_dst by amt ----
        R_RD:   st <= R_CHK;
        R_CHK: begin
          neg <= arr_out[N-1];
          st  <= R_PRE;
        end
        R_PRE:  st <= R_WPRE;                        // (NOT) src -> dst
        R_WPRE: st <= R_SH;
        R_SH:   st <= R_WSH;
        R_WSH: begin
          amt <= amt - AMW'(step);
          st  <= (amt == AMW'(step)) ? R_POST : R_SH;
        end
        R_POST:  st <= R_WPOST;                      // (NOT) dst -> dst
        R_WPOST: st <= ret;

        default: st <= S_IDLE;
      endcase
    end
  end
endmodule

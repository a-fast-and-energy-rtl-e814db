// cim_pn_top: CiM-PN, several computing-in-memory arrays for
// prototypical-network inference.
//
// Each of NUM_ARRAYS arrays (cim_array, M x N) has its own sequencer
// (pn_ctrl), so the arrays compute in parallel on the data each one holds:
// class prototypes by iM-Mean, and Manhattan distances with the nearest
// prototype by iM-NearestNeighbor. A host loads and reads rows and issues
// commands through one port.
//
// Host port (all synchronous to clk, one request per cycle):
//   host_wr    write host_wdata into row host_row of array host_sel
//              (bitline drivers). Ignored while that array is busy.
//   host_rd    read row host_row of array host_sel; host_rdata holds the
//              word from the next cycle on. Ignored while busy.
//   cmd_start  start cmd (1 = MEAN, 2 = NN) with the given slots and counts
//              on array host_sel, or on every array when cmd_bcast is set.
//              cmd_fix_pt selects fixed-point data (one row per element)
//              instead of floating point (one slot of two rows).
//              Each array reports busy/done/err/class_idx (see pn_ctrl).
// The number of arrays is this design's choice; rows, columns and the
// datapath of each array follow the published 64 x 64 CiM array.
module cim_pn_top
  import cim_pkg::*;
#(
  parameter int unsigned NUM_ARRAYS = 4,
  parameter int unsigned M          = CIM_M,
  parameter int unsigned N          = CIM_N,
  parameter int unsigned CW         = 8,
  localparam int unsigned SW        = (NUM_ARRAYS > 1) ? $clog2(NUM_ARRAYS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [SW-1:0]         host_sel,
  input  logic                  host_wr,
  input  logic                  host_rd,
  input  logic [ROW_AW-1:0]     host_row,
  input  logic [N-1:0]          host_wdata,
  output logic [N-1:0]          host_rdata,
  input  logic                  cmd_start,
  input  logic                  cmd_bcast,
  input  logic [1:0]            cmd,
  input  logic                  cmd_fix_pt,
  input  logic [CW-1:0]         src_slot,
  input  logic [CW-1:0]         dst_slot,
  input  logic [CW-1:0]         dim,
  input  logic [CW-1:0]         count,
  input  logic [4:0]            k_log2,
  output logic [NUM_ARRAYS-1:0] busy,
  output logic [NUM_ARRAYS-1:0] done,
  output logic [NUM_ARRAYS-1:0] err,
  output logic [CW-1:0]         class_idx [NUM_ARRAYS]
);
  logic [N-1:0] arr_out [NUM_ARRAYS];
  logic [SW-1:0] rd_sel;

  for (genvar a = 0; a < NUM_ARRAYS; a++) begin : g_arr
    cim_uop_t     ctrl_uop, uop;
    logic [N-1:0] ctrl_din, din;
    logic         sel, start;
    logic         unused_cout;

    assign sel   = (host_sel == SW'(a));
    assign start = cmd_start & (cmd_bcast | sel) & ~busy[a];

    pn_ctrl #(.M(M), .N(N), .CW(CW)) u_ctrl (
      .clk(clk), .rst_n(rst_n), .start(start), .cmd(cmd), .fix_pt(cmd_fix_pt),
      .src_slot(src_slot), .dst_slot(dst_slot), .dim(dim), .count(count), .k_log2(k_log2),
      .uop(ctrl_uop), .data_in(ctrl_din), .arr_out(arr_out[a]),
      .busy(busy[a]), .done(done[a]), .err(err[a]), .class_idx(class_idx[a])
    );

    // The host reaches an array only while its sequencer is idle.
    always_comb begin
      uop = ctrl_uop;
      din = ctrl_din;
      if (!busy[a] && sel) begin
        if (host_wr) begin
          uop = uop_wr(host_row, 1'b1);
          din = host_wdata;
        end else if (host_rd) begin
          uop = uop_rd(OP_OR, host_row, 1'b0, '0, 1'b0, MASK_NONE);
        end
      end
    end

    cim_array #(.M(M), .N(N)) u_array (
      .clk(clk), .rst_n(rst_n), .uop(uop), .data_in(din),
      .out(arr_out[a]), .cout(unused_cout)
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rd_sel <= '0;
    else if (host_rd) rd_sel <= host_sel;
  end
  assign host_rdata = arr_out[rd_sel];

  // A host request must not target an array that is busy.
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                (host_wr || host_rd) |-> !busy[host_sel]);
  a_host_one:  assert property (@(posedge clk) disable iff (!rst_n) !(host_wr && host_rd));
endmodule

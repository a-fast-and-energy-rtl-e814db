// copy_buffers: the write path of a CiM array.
//
// Copy buffers put the array result (the shifter output held in the OUT
// latch) back onto the bitlines when Enable Copy is set, so the result is
// written in place into the row whose wordline is raised. The bitline
// drivers do the same for external data ("Data in"). This block selects
// which one drives the bitlines and raises the array's write enable when
// either does. Copy and external write at the same time is not allowed (the
// clocked array checks it); external data wins if it happens.
// Combinational.
//
// Copy buffers and bitline drivers follow the published array; the
// priority of external data over a copy is this design's own choice.
module copy_buffers #(
  parameter int unsigned N = 64
) (
  input  logic         enable_copy,
  input  logic [N-1:0] result,
  input  logic         data_in_en,
  input  logic [N-1:0] data_in,
  output logic         we,
  output logic [N-1:0] wdata
);
  always_comb begin
    we    = enable_copy | data_in_en;
    wdata = data_in_en ? data_in : result;
  end
endmodule

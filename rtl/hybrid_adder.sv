// hybrid_adder: reconfigurable KS-CLA hybrid SIMD adder.
//
// The WIDTH-bit adder is a chain of 4-bit units. The units of the low half
// (bits [WIDTH/2-1:0], at the default bits [7:0]) are carry look-ahead units
// (cla4); the units of the high half are Kogge-Stone units (ks4). With
// WIDTH = 16 this is units 0 and 1 (CLA, [3:0] and [7:4]) and units 2 and 3
// (Kogge-Stone, [11:8] and [15:12]), chained by Cout[0], Cout[1], Cout[2].
//
// Reconfiguration: the lane-width inputs q (4-bit lanes), o (8-bit lanes) and
// h (16-bit lanes) decide where lanes start. The carry into a unit that starts
// a lane is the adder's cin; any other unit takes the carry out of the unit
// below. If several are set the narrowest wins; with none set the whole WIDTH
// is one lane. cin is applied to every lane, so a + ~b with cin = 1 subtracts
// lane by lane. cout holds every unit's carry out; the carry out of a lane is
// the entry of its top unit.
//
// Purely combinational. The unit split, the CLA/KS halves and the Q/O/H lane
// widths follow the processor description; how the carry chain is cut is this
// design's choice.
module hybrid_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               cin,
  input  logic               q,
  input  logic               o,
  input  logic               h,
  output logic [WIDTH-1:0]   sum,
  output logic [WIDTH/4-1:0] cout
);
  localparam int unsigned NU = WIDTH / 4;

  logic [NU-1:0] lane_start;

  // a unit starts a lane when its bit position is a multiple of the lane width
  always_comb begin
    for (int k = 0; k < NU; k++) begin
      if (q)      lane_start[k] = 1'b1;
      else if (o) lane_start[k] = (k % 2) == 0;
      else if (h) lane_start[k] = (k % 4) == 0;
      else        lane_start[k] = (k == 0);
    end
  end

  // the carry chain is kept as one signal per unit so that no vector feeds itself
  for (genvar k = 0; k < NU; k++) begin : g_unit
    logic unit_cin, unit_cout;
    assign cout[k] = unit_cout;
    if (k == 0) begin : g_first
      assign unit_cin = cin;
    end else begin : g_chain
      assign unit_cin = lane_start[k] ? cin : g_unit[k-1].unit_cout;
    end

    if (k < NU / 2) begin : g_cla
      cla4 u_cla (
        .a   (a[4*k +: 4]),
        .b   (b[4*k +: 4]),
        .cin (unit_cin),
        .sum (sum[4*k +: 4]),
        .cout(unit_cout)
      );
    end else begin : g_ks
      ks4 u_ks (
        .a   (a[4*k +: 4]),
        .b   (b[4*k +: 4]),
        .cin (unit_cin),
        .sum (sum[4*k +: 4]),
        .cout(unit_cout)
      );
    end
  end

  initial begin
    assert (WIDTH % 8 == 0 && WIDTH >= 8)
      else $error("hybrid_adder: WIDTH must be a multiple of 8");
  end
endmodule

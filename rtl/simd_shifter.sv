// simd_shifter: lane-wise SIMD shifter.
//
// The WIDTH-bit input is split into lanes of 4 (q), 8 (o) or 16 (h) bits, or
// one WIDTH-bit lane when none is set (narrowest wins). Every lane is shifted
// by the same amount, shamt taken modulo the lane width: left (zeros enter),
// logical right (zeros enter) or arithmetic right (the lane's sign bit
// enters). Bits never cross a lane boundary. One shifter set per lane width is
// built and the mode selects among them.
// Purely combinational. Lane widths follow the processor description; the
// three shift kinds and the modulo amount are this design's choices.
module simd_shifter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [3:0]       shamt,
  input  logic             dir_right,
  input  logic             arith,
  input  logic             q,
  input  logic             o,
  input  logic             h,
  output logic [WIDTH-1:0] y
);
  localparam int unsigned LWS [4] = '{4, 8, 16, WIDTH};

  logic [WIDTH-1:0] ys [4];

  for (genvar m = 0; m < 4; m++) begin : g_mode
    localparam int unsigned LW = LWS[m];
    for (genvar l = 0; l < WIDTH / LW; l++) begin : g_lane
      logic [LW-1:0] x;
      logic [4:0]    s;
      assign x = a[LW*l +: LW];
      assign s = 5'(shamt) & 5'(LW - 1);
      assign ys[m][LW*l +: LW] = !dir_right ? x << s
                               : arith      ? LW'($signed(x) >>> s)
                               :              x >> s;
    end
  end

  always_comb begin
    if (q)      y = ys[0];
    else if (o) y = ys[1];
    else if (h) y = ys[2];
    else        y = ys[3];
  end

  initial begin
    assert (WIDTH % 16 == 0)
      else $error("simd_shifter: WIDTH must be a multiple of 16");
  end
endmodule

// simd_multiplier: lane-wise SIMD multiplier built as a sum of products.
//
// The WIDTH-bit operands are split into lanes of 4 (q), 8 (o) or 16 (h) bits,
// or one WIDTH-bit lane when none is set; the narrowest set lane width wins.
// Every lane returns the low lane-width bits of the product of its two lane
// values, which is also the correct low half for two's complement operands.
//
// How it works, in three steps:
//   partial products : row j holds a's lane shifted left by j inside its lane,
//                      gated by bit j of b's lane (rows j >= lane width are 0);
//   carry-save array : the rows are added one by one with 3:2 compressors
//                      into two vectors, dout0 (sums) and dout1 (carries); a
//                      carry is moved one bit left but dropped at a lane's top
//                      bit, so nothing crosses a lane boundary;
//   final adder      : dout0 + dout1 in the reconfigurable KS-CLA hybrid
//                      adder, run in the same lane mode.
// Purely combinational. The lane widths and the hybrid adder as the final
// carry-propagate adder of a partial-product reduction follow the processor
// description; the row-by-row carry-save array and the low-half result are
// this design's choices.
module simd_multiplier #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             q,
  input  logic             o,
  input  logic             h,
  output logic [WIDTH-1:0] p
);
  logic [WIDTH-1:0] lane_lsb;   // bit i is the lowest bit of its lane
  logic [WIDTH-1:0] pp [WIDTH];
  logic [WIDTH-1:0] dout0, dout1;
  logic [WIDTH/4-1:0] cpa_cout;  // lane carries out are not needed for a low-half product

  // lane width selected by the mode bits
  function automatic int unsigned lane_w(input logic fq, input logic fo, input logic fh);
    if (fq)      return 4;
    else if (fo) return 8;
    else if (fh) return 16;
    else         return WIDTH;
  endfunction

  // partial products
  always_comb begin
    int unsigned lw;
    lw = lane_w(q, o, h);
    for (int i = 0; i < WIDTH; i++) lane_lsb[i] = ((i % lw) == 0);
    for (int j = 0; j < WIDTH; j++) begin
      for (int i = 0; i < WIDTH; i++) begin
        int unsigned pos, base;
        pos  = i % lw;
        base = i - pos;
        if (j < lw && pos >= j) pp[j][i] = a[i - j] & b[base + j];
        else                    pp[j][i] = 1'b0;
      end
    end
  end

  // carry-save array: (dout0, dout1) accumulate the rows
  always_comb begin
    logic [WIDTH-1:0] s, c, maj;
    s = pp[0];
    c = '0;
    for (int j = 1; j < WIDTH; j++) begin
      maj = (s & c) | (s & pp[j]) | (c & pp[j]);
      s   = s ^ c ^ pp[j];
      c   = (maj << 1) & ~lane_lsb;
    end
    dout0 = s;
    dout1 = c;
  end

  // final carry-propagate add in the hybrid adder
  hybrid_adder #(.WIDTH(WIDTH)) u_cpa (
    .a   (dout0),
    .b   (dout1),
    .cin (1'b0),
    .q   (q),
    .o   (o),
    .h   (h),
    .sum (p),
    .cout(cpa_cout)
  );

  initial begin
    assert (WIDTH % 16 == 0)
      else $error("simd_multiplier: WIDTH must be a multiple of 16");
  end
endmodule

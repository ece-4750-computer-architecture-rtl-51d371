// mul_pipe: the four-stage multiplier Y0..Y3.
//
// An operation enters Y0 with its operands and a tag (destination register
// and reorder-buffer slot) and leaves from Y3 four cycles later with the low
// XLEN bits of the product. The 32x32 product is split into four 8-bit slices
// of operand b, one partial product accumulated per stage, so each stage holds
// an XLEN x 8 multiply and an add. The pipeline never stalls: the issue stage
// reserves the writeback slot before it sends an operation in.
//
// Only the four stages are given by the pipeline drawing; the slice-per-stage
// arithmetic is this design's choice.
//
// Interface: in_* is the operation entering Y0 in this cycle; y3_* shows what
// is in Y3 (result valid at the end of the cycle, used for bypassing and for
// writeback on the next edge).
module mul_pipe #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_val,
  input  logic [XLEN-1:0]  in_a,
  input  logic [XLEN-1:0]  in_b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             y3_val,
  output logic [XLEN-1:0]  y3_result,
  output logic [TAG_W-1:0] y3_tag
);
  localparam int unsigned NST = 4;
  localparam int unsigned SL  = XLEN / NST;  // bits of b consumed per stage

  typedef struct packed {
    logic             val;
    logic [XLEN-1:0]  a;
    logic [XLEN-1:0]  b;
    logic [XLEN-1:0]  acc;
    logic [TAG_W-1:0] tag;
  } stage_t;

  stage_t st [NST];       // registers feeding Y0..Y3
  stage_t nx [NST];       // value each stage hands to the next one

  // stage k adds the partial product of slice k of b
  always_comb begin
    for (int k = 0; k < NST; k++) begin
      nx[k]     = st[k];
      nx[k].acc = st[k].acc + ((st[k].a * XLEN'(st[k].b[k*SL +: SL])) << (k * SL));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NST; k++) st[k] <= '0;
    end else begin
      st[0] <= '{val: in_val, a: in_a, b: in_b, acc: '0, tag: in_tag};
      for (int k = 1; k < NST; k++) st[k] <= nx[k-1];
    end
  end

  assign y3_val    = st[NST-1].val;
  assign y3_result = nx[NST-1].acc;
  assign y3_tag    = st[NST-1].tag;

endmodule

// lpdu: Last Pixel Detection Unit of the EX1 stage.
//
// On the first iteration of an image instruction (Lo = 0) it adds the image size SZ to the
// image start address Ad1 and stores the end address in register SZR; on later iterations
// (Lo = 1) it keeps SZR. Each iteration it compares the current block-memory read address
// BMAr with the end address and raises e (the Reset&Update signal to the control unit)
// when they are equal: the read stream has gone past the last pixel word and the
// instruction can finish. The adder, the Lo multiplexer, SZR and the equality comparator
// follow the design's LPDU circuit.
// Because BMAr advances a word (4 pixels) at a time, SZ is rounded up to a multiple of 4
// before the addition; without this an image of, say, 55x55 = 3025 pixels would never
// produce an equal comparison. That rounding is this implementation's addition.
// e is combinational from the inputs and SZR; SZR is written on enabled cycles with Lo = 0.
module lpdu (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,     // an image-instruction iteration is in EX1
  input  logic        lo,
  input  logic [31:0] sz,     // Read_data_4: image size in pixels
  input  logic [31:0] ad1,    // Read_data_1: image start address
  input  logic [31:0] bmar,   // current block-memory read address from the ACU
  output logic        e       // Reset&Update
);
  logic [31:0] szr_q, end_addr;

  always_comb begin
    end_addr = lo ? szr_q : ad1 + ((sz + 32'd3) & ~32'd3);
    e        = en && (bmar == end_addr);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         szr_q <= '0;
    else if (en && !lo) szr_q <= end_addr;
  end
endmodule

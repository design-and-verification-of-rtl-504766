// gray_ptr: FIFO pointer kept as a binary counter and as its Gray-coded copy.
//
// The binary count addresses the FIFO memory; the Gray copy is what crosses into the other
// clock domain, because consecutive Gray values differ in one bit, so a synchronizer that
// samples it mid-change sees either the old or the new value and never a wrong one. The
// conversion is gray[i] = bin[i] ^ bin[i+1] with the top bit taken as is, the rule the
// bridge's description gives for a 4-bit count. Both copies are registered, so the Gray
// output is glitch-free; gray_next is the value after the current edge, which the
// FIFO compares to form its full and empty flags one cycle earlier.
//
// Interface: inc advances the pointer by one on the rising clk edge. rst_n is asynchronous,
// active low, and clears both copies. W is the pointer width: the FIFO address width plus
// one wrap bit (default 5, for a 16-entry FIFO; this size is this design's choice).
module gray_ptr
  import bridge_pkg::*;
#(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  output logic [W-1:0] bin,
  output logic [W-1:0] gray,
  output logic [W-1:0] gray_next
);

  logic [W-1:0] bin_next;

  always_comb begin
    bin_next  = bin + W'(inc);
    gray_next = W'(bin2gray(32'(bin_next)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin  <= '0;
      gray <= '0;
    end else begin
      bin  <= bin_next;
      gray <= gray_next;
    end
  end

endmodule

// tb_gray_ptr: self-checking test of the Gray-coded FIFO pointer.
//
// Advances the pointer on random cycles and checks, after every edge, that the binary
// copy equals an independent count of the advances, that the Gray copy equals the
// bit-by-bit rule gray[i] = bin[i] ^ bin[i+1] (top bit copied), that gray_next predicts
// the next Gray value, and that successive Gray values differ in at most one bit, through
// several wrap-arounds of the 5-bit pointer.
module tb_gray_ptr;
  localparam int unsigned W = 5;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         inc = 1'b0;
  logic [W-1:0] bin, gray, gray_next;

  int checks = 0, failures = 0;
  int unsigned count = 0;

  gray_ptr #(.W(W)) dut (.clk, .rst_n, .inc, .bin, .gray, .gray_next);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] ref_gray(input logic [W-1:0] b);
    logic [W-1:0] g;
    for (int i = 0; i < W - 1; i++) g[i] = b[i] ^ b[i+1];
    g[W-1] = b[W-1];
    return g;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: bin=%0d gray=%b count=%0d", what, bin, gray, count);
    end
  endtask

  initial begin
    logic [W-1:0] prev_gray, predicted;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(bin == 0 && gray == 0, "reset value");
    prev_gray = gray;
    for (int n = 0; n < 200; n++) begin
      inc = ($urandom_range(0, 3) != 0);
      #1;                             // inputs settled: look at the prediction
      predicted = gray_next;
      check(predicted == ref_gray(W'(count + (inc ? 1 : 0))), "gray_next");
      @(posedge clk);
      if (inc) count++;
      @(negedge clk);
      check(bin == W'(count), "binary count");
      check(gray == ref_gray(bin), "gray code");
      check(gray == predicted, "gray_next matches registered value");
      check($countones(gray ^ prev_gray) <= 1, "single bit change");
      prev_gray = gray;
    end
    check(count > 2 * (1 << W), "pointer wrapped at least twice");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

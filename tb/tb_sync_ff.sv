// tb_sync_ff: self-checking test of the two-flop synchronizer.
//
// Drives a new random value on every cycle and checks that q shows, after each edge, the
// value d had two edges earlier, and that reset clears every stage.
module tb_sync_ff;
  localparam int unsigned W = 5;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [W-1:0] d = '0, q;
  logic [W-1:0] hist [3];

  int checks = 0, failures = 0;

  sync_ff #(.W(W)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    d = 5'h1f;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (q != '0) begin failures++; $display("FAIL reset: q=%h", q); end
    rst_n = 1'b1;
    hist[0] = '0; hist[1] = '0; hist[2] = '0;
    for (int n = 0; n < 100; n++) begin
      d = W'($urandom);
      @(posedge clk);
      hist[2] = hist[1];
      hist[1] = hist[0];
      hist[0] = d;
      @(negedge clk);
      checks++;
      if (q != hist[1]) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h", n, q, hist[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

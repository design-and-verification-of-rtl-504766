// tb_fifo_mem: self-checking test of the FIFO storage array.
//
// Writes random words to random addresses (some cycles with wen low, which must not
// write), keeps a reference copy, and reads every address back through the
// asynchronous read port.
module tb_fifo_mem;
  localparam int unsigned DW = 32, AW = 4, N = 1 << AW;

  logic          wclk = 1'b0;
  logic          wen = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] ref_mem [N];

  int checks = 0, failures = 0;

  fifo_mem #(.DATA_W(DW), .ADDR_W(AW)) dut (.wclk, .wen, .waddr, .wdata, .raddr, .rdata);

  always #5 wclk = ~wclk;

  initial begin
    // fill every location once so that the reference is defined
    for (int a = 0; a < N; a++) begin
      @(negedge wclk);
      wen = 1'b1; waddr = AW'(a); wdata = $urandom;
      ref_mem[a] = wdata;
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge wclk);
      raddr = AW'($urandom);
      #1;
      checks++;
      if (rdata != ref_mem[raddr]) begin
        failures++;
        $display("FAIL read %0d: %h expected %h", raddr, rdata, ref_mem[raddr]);
      end
      // next write, done on the coming rising edge
      wen = $urandom_range(0, 1) == 1;
      waddr = AW'($urandom);
      wdata = $urandom;
      if (wen) ref_mem[waddr] = wdata;
    end
    @(negedge wclk);
    wen = 1'b0;
    for (int a = 0; a < N; a++) begin
      raddr = AW'(a);
      #1;
      checks++;
      if (rdata != ref_mem[a]) begin
        failures++;
        $display("FAIL final read %0d: %h expected %h", a, rdata, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge wclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

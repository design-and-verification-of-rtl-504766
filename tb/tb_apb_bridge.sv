// tb_apb_bridge: self-checking test of the APB master back end.
//
// The testbench plays the FIFO (a queue whose head is shown on paddr_in/pwrite_in/pwdata_in
// and removed by pop) and an APB peripheral. Phase 1: eight writes queued at once with
// pready always high must complete back to back: one cycle to leave IDLE, then SETUP +
// ACCESS for each, 17 PCLK cycles in all. Phase 2: a random mix of reads and writes with random wait states; every APB
// transfer must match the queue in order, keep its signals stable while penable is high,
// return read data on prdata_out with one rdata_valid pulse, and report pslverr (given
// for address 0xEC) on xfer_err. The master must go idle (psel low) when the queue empties.
module tb_apb_bridge;
  import bridge_pkg::*;

  logic              pclk = 1'b0, preset_n = 1'b0;
  logic              empty, pwrite_in, pop;
  logic [ADDR_W-1:0] paddr_in;
  logic [DATA_W-1:0] pwdata_in;
  logic              pready = 1'b1, pslverr;
  logic [DATA_W-1:0] prdata;
  logic              psel, penable, pwrite, rdata_valid, xfer_err;
  logic [ADDR_W-1:0] paddr;
  logic [DATA_W-1:0] pwdata, prdata_out;

  apb_bridge dut (.*);

  always #10 pclk = ~pclk;

  xfer_t fifo [$];
  xfer_t expected [$];
  logic [DATA_W-1:0] exp_rdata [$];
  int exp_errs = 0;
  int checks = 0, failures = 0, done_cnt = 0, waits = 0, rvalids = 0, errs = 0;

  assign empty     = (fifo.size() == 0);
  assign pwrite_in = empty ? 1'b0 : fifo[0].write;
  assign paddr_in  = empty ? '0 : fifo[0].addr;
  assign pwdata_in = empty ? '0 : fifo[0].data;

  function automatic logic [DATA_W-1:0] rd_value(input logic [ADDR_W-1:0] a);
    return {8'h5a, a, ~a, a ^ 8'h3c};
  endfunction

  assign prdata  = rd_value(paddr);
  assign pslverr = psel && penable && (paddr == 8'hec);

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s at %0t", what, $time);
  endtask

  // pop is sampled at the edge, the head removed just after it
  always @(posedge pclk) begin
    if (pop) begin
      #1 void'(fifo.pop_front());
    end
  end

  // peripheral and monitor
  always @(negedge pclk) if (preset_n) begin
    if (psel && penable) begin
      checks++;
      if (!$stable(paddr) || !$stable(pwdata) || !$stable(pwrite)) fail("ACCESS signals moved");
      if (pready) begin
        checks++;
        done_cnt++;
        if (expected.size() == 0) fail("unexpected transfer");
        else begin
          if (pwrite != expected[0].write || paddr != expected[0].addr ||
              (pwrite && pwdata != expected[0].data)) fail("transfer mismatch");
          if (!pwrite) exp_rdata.push_back(rd_value(paddr));
          if (paddr == 8'hec) exp_errs++;
          void'(expected.pop_front());
        end
      end else waits++;
    end
    if (rdata_valid) begin
      checks++;
      rvalids++;
      if (exp_rdata.size() == 0 || prdata_out != exp_rdata[0]) fail("read data");
      else void'(exp_rdata.pop_front());
    end
    if (xfer_err) errs++;
  end

  task automatic queue_xfer(input bit write, input logic [ADDR_W-1:0] a);
    xfer_t x;
    x.write = write; x.addr = a; x.data = write ? DATA_W'($urandom) : '0;
    fifo.push_back(x);
    expected.push_back(x);
  endtask

  initial begin
    int t0, n;
    repeat (3) @(posedge pclk);
    #1 preset_n = 1'b1;
    @(posedge pclk);
    checks++;
    if (psel) fail("psel while idle");

    // phase 1: throughput with no wait states
    @(negedge pclk);
    for (int i = 0; i < 8; i++) queue_xfer(1'b1, ADDR_W'(4 * i));
    t0 = done_cnt;
    n = 0;
    while (done_cnt < t0 + 8) begin @(posedge pclk); n++; end
    checks++;
    // one edge to leave IDLE, then SETUP + ACCESS for each of the eight
    if (n != 17) fail($sformatf("8 writes took %0d cycles, expected 17", n));
    repeat (2) @(posedge pclk);
    checks++;
    if (psel) fail("psel after queue drained");

    // phase 2: random traffic and wait states
    fork
      forever begin
        @(posedge pclk);
        #1 pready = ($urandom_range(0, 2) != 0);
      end
      begin
        for (int i = 0; i < 60; i++) begin
          @(negedge pclk);
          if ($urandom_range(0, 1) == 1)
            queue_xfer($urandom_range(0, 1) == 1, (i % 10 == 3) ? 8'hec : ADDR_W'($urandom));
        end
      end
    join_any
    wait (expected.size() == 0);
    repeat (4) @(posedge pclk);
    checks += 3;
    if (waits == 0) fail("no wait state seen");
    if (exp_errs == 0 || errs != exp_errs) fail($sformatf("xfer_err %0d, expected %0d", errs, exp_errs));
    if (exp_rdata.size() != 0 || rvalids == 0) fail("read results missing");
    $display("transfers=%0d waits=%0d reads=%0d errors=%0d", done_cnt, waits, rvalids, errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge pclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

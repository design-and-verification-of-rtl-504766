// tb_bridge_clock_ratio: the bridge under long write streams at three clock ratios.
//
// Runs the default-size bridge three times, resetting between runs, with HCLK/PCLK periods
// of 30/40 ns (the 3/4 ratio the bridge is meant for), 10/30 ns, and 20/10 ns (AHB slower
// than APB). Each run streams 48 back-to-back AHB writes (an undefined-length INCR burst)
// with a peripheral that never inserts wait states. Checks per run: all 48 writes reach the
// APB in order and intact; while the FIFO holds a backlog the APB completes one transfer
// every 2 PCLK cycles exactly; whenever AHB is faster than the APB drain rate the FIFO
// fills and AHB is stalled, and when AHB is slower it never is.
module tb_bridge_clock_ratio;
  import bridge_pkg::*;

  localparam int N = 48;

  logic              hclk = 1'b0, hreset_n = 1'b0, pclk = 1'b0, preset_n = 1'b0;
  logic              hsel = 1'b0, hwrite = 1'b0, hready;
  logic [2:0]        hsize = 3'd2, hburst = 3'b001;
  logic [1:0]        htrans = '0;
  logic [DATA_W-1:0] hwdata = '0;
  logic [ADDR_W-1:0] haddr = '0;
  logic              hreadyout, addr_err, push_err_on_full;
  logic              pready = 1'b1, pslverr = 1'b0;
  logic [DATA_W-1:0] prdata = '0;
  logic              psel, penable, pwrite, rdata_valid, xfer_err, pop_err_on_empty;
  logic [ADDR_W-1:0] paddr;
  logic [DATA_W-1:0] pwdata, prdata_out;

  assign hready = hreadyout;

  ahb2apb_bridge dut (.*);

  int hhalf = 5, phalf = 15;
  initial forever #(hhalf) hclk = ~hclk;
  initial forever #(phalf) pclk = ~pclk;

  int checks = 0, failures = 0;
  int done_cnt, stalls, last_done_cycle, pclk_cycle, bad_rate;
  logic [DATA_W-1:0] sent [N];

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s at %0t", what, $time);
  endtask

  always @(posedge pclk) pclk_cycle++;

  always @(negedge pclk) if (preset_n && psel && penable && pready) begin
    checks++;
    if (!pwrite || paddr != ADDR_W'(4 * done_cnt) || pwdata != sent[done_cnt])
      fail($sformatf("transfer %0d: a=%h d=%h", done_cnt, paddr, pwdata));
    // a backlog is present from the second transfer on, until the FIFO drains
    if (done_cnt > 0 && !dut.empty && pclk_cycle - last_done_cycle != 2) bad_rate++;
    last_done_cycle = pclk_cycle;
    done_cnt++;
  end

  always @(negedge hclk) if (hreset_n && !hreadyout) stalls++;

  task automatic run(input int th, input int tp, input bit expect_stall);
    hreset_n = 1'b0; preset_n = 1'b0;
    hhalf = th / 2; phalf = tp / 2;
    done_cnt = 0; stalls = 0; bad_rate = 0; last_done_cycle = 0;
    htrans = 2'b00; hsel = 1'b0;
    for (int i = 0; i < N; i++) sent[i] = $urandom;
    repeat (4) @(posedge pclk);
    repeat (2) @(posedge hclk);
    hreset_n = 1'b1; preset_n = 1'b1;
    // AHB master: address phase of beat i with the data phase of beat i-1
    for (int i = 0; i <= N; i++) begin
      @(posedge hclk);
      #1;
      hsel   = 1'b1;
      htrans = (i == N) ? 2'b00 : (i == 0) ? 2'b10 : 2'b11;
      hwrite = 1'b1;
      haddr  = ADDR_W'(4 * i);
      if (i > 0) hwdata = sent[i-1];
      // hold this address/data until the slave is ready
      forever begin
        @(negedge hclk);
        if (hreadyout) break;
        @(posedge hclk);
        #1;
      end
    end
    wait (done_cnt == N);
    repeat (4) @(posedge pclk);
    checks += 3;
    if (bad_rate != 0) fail($sformatf("%0d transfers off the 2-cycle rate (T %0d/%0d)", bad_rate, th, tp));
    if (expect_stall && stalls == 0) fail($sformatf("no stall at T %0d/%0d", th, tp));
    if (!expect_stall && stalls != 0) fail($sformatf("%0d stalls at T %0d/%0d", stalls, th, tp));
    $display("T_hclk=%0d T_pclk=%0d transfers=%0d stalls=%0d", th, tp, done_cnt, stalls);
  endtask

  initial begin
    run(30, 40, 1'b1);    // HCLK period exactly 3/4 of PCLK
    run(10, 30, 1'b1);
    run(20, 10, 1'b0);    // AHB slower than the APB drain rate of 2 PCLK cycles
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

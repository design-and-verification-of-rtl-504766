// tb_slave_ahb: self-checking test of the AHB slave front end.
//
// A small AHB master drives single transfers and every burst type (INCR, INCR4/8/16,
// WRAP4/8/16) of reads and writes, with IDLE gaps, while the testbench plays a FIFO whose
// full flag turns on and off at random. Checks: every transfer comes out once, in order, as
// {write, address, data} on the push port, with the write data of its data phase (zero for
// reads); no push while full; hreadyout is low exactly while a data phase meets a full FIFO,
// and such stalls happen; a SEQ beat at a wrong address raises addr_err exactly once and
// correct bursts never do.
module tb_slave_ahb;
  import bridge_pkg::*;

  logic              hclk = 1'b0, hreset_n = 1'b0;
  logic              hsel = 1'b0, hwrite = 1'b0;
  logic [2:0]        hsize = '0, hburst = '0;
  logic [1:0]        htrans = '0;
  logic [DATA_W-1:0] hwdata = '0;
  logic [ADDR_W-1:0] haddr = '0;
  logic              hreadyout, addr_err, full = 1'b0, push;
  logic              hready;
  xfer_t             hwdata_out;

  assign hready = hreadyout;

  slave_ahb dut (.*);

  always #5 hclk = ~hclk;

  typedef struct {
    logic [1:0]        trans;
    logic              write;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    logic [2:0]        size;
    logic [2:0]        burst;
  } beat_t;

  beat_t beats [$];
  xfer_t expected [$];
  int checks = 0, failures = 0;
  int stalls = 0, pushes = 0, addr_errs = 0;

  // burst beats with addresses worked out here, not by the slave's function
  task automatic add_burst(input logic [2:0] burst, input int len, input logic [2:0] size,
                           input logic [ADDR_W-1:0] start, input bit write);
    int bytes = 1 << size;
    int wrap_len;
    logic [ADDR_W-1:0] a = start;
    wrap_len = (burst == 3'b010) ? 4 : (burst == 3'b100) ? 8 : (burst == 3'b110) ? 16 : 0;
    for (int i = 0; i < len; i++) begin
      beat_t b;
      b.trans = (i == 0) ? 2'b10 : 2'b11;
      b.write = write; b.addr = a; b.data = $urandom; b.size = size; b.burst = burst;
      beats.push_back(b);
      if (wrap_len != 0) begin
        int base = (int'(a) / (wrap_len * bytes)) * (wrap_len * bytes);
        a = ADDR_W'(base + ((int'(a) - base + bytes) % (wrap_len * bytes)));
      end else a = a + ADDR_W'(bytes);
    end
  endtask

  task automatic add_idle(input int n);
    for (int i = 0; i < n; i++) begin
      beat_t b;
      b = '{trans: 2'b00, write: 1'b0, addr: '0, data: '0, size: '0, burst: '0};
      beats.push_back(b);
    end
  endtask

  // AHB master: presents one address phase per HREADY cycle, data one cycle later
  beat_t ap, dp;
  bit    dp_live = 1'b0;
  initial begin
    bit rdy;
    ap = '{trans: 2'b00, write: 1'b0, addr: '0, data: '0, size: '0, burst: '0};
    @(posedge hreset_n);
    forever begin
      @(negedge hclk);
      rdy = hreadyout;
      @(posedge hclk);
      #1;
      if (rdy) begin
        dp = ap;
        dp_live = (ap.trans[1] == 1'b1);
        if (dp_live) expected.push_back('{write: dp.write, addr: dp.addr,
                                          data: dp.write ? dp.data : '0});
        if (beats.size() != 0) ap = beats.pop_front();
        else ap = '{trans: 2'b00, write: 1'b0, addr: '0, data: '0, size: '0, burst: '0};
        hsel = 1'b1; htrans = ap.trans; hwrite = ap.write; haddr = ap.addr;
        hsize = ap.size; hburst = ap.burst;
        hwdata = dp_live && dp.write ? dp.data : DATA_W'($urandom);
      end
    end
  end

  // FIFO full flag model
  initial begin
    forever begin
      @(posedge hclk);
      #2 full = ($urandom_range(0, 9) < 3);
    end
  end

  // monitor
  always @(negedge hclk) if (hreset_n) begin
    checks++;
    if (hreadyout != !(dut.dp_valid && full)) begin
      failures++; $display("FAIL hreadyout at %0t", $time);
    end
    if (!hreadyout) stalls++;
    if (push) begin
      checks++;
      pushes++;
      if (full) begin failures++; $display("FAIL push while full"); end
      if (expected.size() == 0) begin
        failures++; $display("FAIL unexpected push");
      end else begin
        if (hwdata_out != expected[0]) begin
          failures++;
          $display("FAIL push %p expected %p", hwdata_out, expected[0]);
        end
        void'(expected.pop_front());
      end
    end
    if (addr_err) addr_errs++;
  end

  initial begin
    int total;
    add_burst(3'b000, 1, 3'd2, 8'h10, 1'b1);          // SINGLE write
    add_idle(2);
    add_burst(3'b011, 4, 3'd2, 8'h20, 1'b1);          // INCR4
    add_burst(3'b010, 4, 3'd2, 8'h38, 1'b1);          // WRAP4, wraps at 0x40
    add_burst(3'b101, 8, 3'd1, 8'h40, 1'b0);          // INCR8 read, halfwords
    add_idle(1);
    add_burst(3'b100, 8, 3'd2, 8'h74, 1'b1);          // WRAP8
    add_burst(3'b111, 16, 3'd2, 8'h80, 1'b1);         // INCR16
    add_burst(3'b110, 16, 3'd0, 8'h0d, 1'b1);         // WRAP16 bytes
    add_burst(3'b001, 5, 3'd2, 8'hc0, 1'b0);          // INCR undefined length, reads
    add_idle(3);
    total = 0;
    foreach (beats[i]) if (beats[i].trans[1]) total++;
    // one burst with a wrong SEQ address: INCR4 whose last beat jumps
    add_burst(3'b011, 4, 3'd2, 8'he0, 1'b1);
    beats[beats.size() - 1].addr = 8'hf0;
    total += 4;
    add_idle(4);
    repeat (3) @(posedge hclk);
    hreset_n = 1'b1;
    wait (pushes == total);
    repeat (5) @(posedge hclk);
    checks += 4;
    if (expected.size() != 0) begin failures++; $display("FAIL %0d transfers missing", expected.size()); end
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    if (addr_errs != 1) begin failures++; $display("FAIL addr_err count %0d", addr_errs); end
    if (pushes != total) begin failures++; $display("FAIL pushes %0d of %0d", pushes, total); end
    $display("pushes=%0d stalls=%0d addr_errs=%0d", pushes, stalls, addr_errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge hclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

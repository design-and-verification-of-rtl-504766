// tb_ahb2apb_bridge: end-to-end test of the AHB-to-APB bridge at its default size.
//
// hclk runs at 100 MHz and pclk at 33.3 MHz, unrelated in phase (the AHB clock period must
// be at most three quarters of the APB one). An AHB master model issues, in this order:
// five single NONSEQ byte writes (data 132, 67, 103, 33, 104 to addresses 32, 23, 2, 1, 0),
// then writes and reads with every burst type (SINGLE, INCR, INCR4/8/16, WRAP4/8/16),
// with IDLE gaps, and one INCR4 burst whose last beat is at a wrong address. An APB
// peripheral model answers with random wait states, returns a value computed from the
// address for reads and raises pslverr for address 0xEC.
//
// Checks: every AHB transfer appears once on the APB, in order, with its direction,
// address and write data; every read returns its value on prdata_out; xfer_err fires once
// per access to 0xEC; addr_err fires once; the FIFO error flags never fire; the APB
// protocol holds (SETUP then ACCESS, signals stable in ACCESS). Mechanisms counted, each
// must occur: AHB stall on a full FIFO, APB wait state, APB idle between bursts, FIFO
// pointer wrap-around, each burst type, a wrapping burst crossing its boundary, a read,
// an APB error, an address error.
module tb_ahb2apb_bridge;
  import bridge_pkg::*;

  logic              hclk = 1'b0, hreset_n = 1'b0, pclk = 1'b0, preset_n = 1'b0;
  logic              hsel = 1'b0, hwrite = 1'b0, hready;
  logic [2:0]        hsize = '0, hburst = '0;
  logic [1:0]        htrans = '0;
  logic [DATA_W-1:0] hwdata = '0;
  logic [ADDR_W-1:0] haddr = '0;
  logic              hreadyout, addr_err, push_err_on_full;
  logic              pready = 1'b1, pslverr;
  logic [DATA_W-1:0] prdata;
  logic              psel, penable, pwrite, rdata_valid, xfer_err, pop_err_on_empty;
  logic [ADDR_W-1:0] paddr;
  logic [DATA_W-1:0] pwdata, prdata_out;

  assign hready = hreadyout;

  ahb2apb_bridge dut (.*);

  always #5  hclk = ~hclk;
  always #15 pclk = ~pclk;

  typedef struct {
    logic [1:0]        trans;
    logic              write;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    logic [2:0]        size;
    logic [2:0]        burst;
  } beat_t;

  localparam beat_t IDLE_BEAT = '{trans: 2'b00, write: 1'b0, addr: '0, data: '0,
                                  size: '0, burst: '0};

  beat_t beats [$];
  xfer_t expected [$];
  logic [DATA_W-1:0] exp_rdata [$];
  int checks = 0, failures = 0;
  int total = 0, apb_done = 0;

  // mechanism counters
  int n_stall = 0, n_wait = 0, n_idle = 0, n_read = 0, n_err = 0, n_addr_err = 0;
  int n_wrap_cross = 0, exp_err = 0;
  int n_burst [8];

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s at %0t", what, $time);
  endtask

  function automatic logic [DATA_W-1:0] rd_value(input logic [ADDR_W-1:0] a);
    return {a, 8'hc3, ~a, a ^ 8'h96};
  endfunction

  // ---- AHB master model ---------------------------------------------------------------
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
      total++;
      if (wrap_len != 0) begin
        int base = (int'(a) / (wrap_len * bytes)) * (wrap_len * bytes);
        if (int'(a) + bytes == base + wrap_len * bytes && i != len - 1) n_wrap_cross++;
        a = ADDR_W'(base + ((int'(a) - base + bytes) % (wrap_len * bytes)));
      end else a = a + ADDR_W'(bytes);
    end
  endtask

  task automatic add_single(input logic [ADDR_W-1:0] a, input logic [DATA_W-1:0] d);
    beat_t b;
    b = '{trans: 2'b10, write: 1'b1, addr: a, data: d, size: 3'd0, burst: 3'b000};
    beats.push_back(b);
    total++;
  endtask

  task automatic add_idle(input int n);
    for (int i = 0; i < n; i++) beats.push_back(IDLE_BEAT);
  endtask

  initial begin
    beat_t ap, dp;
    bit    rdy, dp_live;
    ap = IDLE_BEAT;
    dp_live = 1'b0;
    @(posedge hreset_n);
    forever begin
      @(negedge hclk);
      rdy = hreadyout;
      if (!rdy) n_stall++;
      @(posedge hclk);
      #1;
      if (rdy) begin
        dp = ap;
        dp_live = (ap.trans[1] == 1'b1);
        if (dp_live) begin
          expected.push_back('{write: dp.write, addr: dp.addr, data: dp.write ? dp.data : '0});
          if (dp.trans == 2'b10) n_burst[dp.burst]++;
        end
        ap = (beats.size() != 0) ? beats.pop_front() : IDLE_BEAT;
        hsel = 1'b1; htrans = ap.trans; hwrite = ap.write; haddr = ap.addr;
        hsize = ap.size; hburst = ap.burst;
        hwdata = (dp_live && dp.write) ? dp.data : DATA_W'($urandom);
      end
    end
  end

  // ---- APB peripheral model and monitor ---------------------------------------------------
  assign prdata  = rd_value(paddr);
  assign pslverr = psel && penable && (paddr == 8'hec);

  initial forever begin
    @(posedge pclk);
    #1 pready = ($urandom_range(0, 3) != 0);
  end

  bit was_busy = 1'b0;
  always @(negedge pclk) if (preset_n) begin
    if (penable && !psel) fail("penable without psel");
    if (psel && penable) begin
      checks++;
      if (!$stable(paddr) || !$stable(pwdata) || !$stable(pwrite)) fail("ACCESS signals moved");
      if (pready) begin
        apb_done++;
        if (expected.size() == 0) fail("APB transfer with nothing expected");
        else begin
          if (pwrite != expected[0].write || paddr != expected[0].addr ||
              (pwrite && pwdata != expected[0].data))
            fail($sformatf("APB transfer w=%0b a=%h d=%h, expected w=%0b a=%h d=%h",
                           pwrite, paddr, pwdata, expected[0].write, expected[0].addr,
                           expected[0].data));
          if (!pwrite) exp_rdata.push_back(rd_value(paddr));
          if (paddr == 8'hec) exp_err++;
          void'(expected.pop_front());
        end
      end else n_wait++;
    end
    if (psel) was_busy = 1'b1;
    else if (was_busy) begin n_idle++; was_busy = 1'b0; end
    if (rdata_valid) begin
      checks++;
      n_read++;
      if (exp_rdata.size() == 0 || prdata_out != exp_rdata[0]) fail("read data");
      else void'(exp_rdata.pop_front());
    end
    if (xfer_err) n_err++;
    if (pop_err_on_empty) fail("pop_err_on_empty");
  end

  always @(negedge hclk) if (hreset_n) begin
    if (addr_err) n_addr_err++;
    if (push_err_on_full) fail("push_err_on_full");
  end

  // ---- stimulus and final checks -----------------------------------------------------------
  initial begin
    // the five single byte writes of the bridge's reference waveform
    add_single(8'd32, 32'd132);
    add_single(8'd23, 32'd67);
    add_single(8'd2,  32'd103);
    add_single(8'd1,  32'd33);
    add_single(8'd0,  32'd104);
    add_idle(100);
    add_burst(3'b011, 4, 3'd2, 8'h20, 1'b1);          // INCR4
    add_burst(3'b010, 4, 3'd2, 8'h38, 1'b1);          // WRAP4, crosses 0x40
    add_idle(120);
    add_burst(3'b101, 8, 3'd1, 8'h40, 1'b0);          // INCR8 reads, halfwords
    add_burst(3'b100, 8, 3'd2, 8'h74, 1'b1);          // WRAP8, crosses 0x80
    add_burst(3'b111, 16, 3'd2, 8'h80, 1'b1);         // INCR16
    add_burst(3'b110, 16, 3'd0, 8'h0d, 1'b1);         // WRAP16 bytes, crosses 0x10
    add_idle(2);
    add_burst(3'b001, 6, 3'd2, 8'hdc, 1'b0);          // INCR reads through 0xEC
    add_burst(3'b000, 1, 3'd2, 8'hec, 1'b1);          // SINGLE write to 0xEC
    add_burst(3'b110, 16, 3'd2, 8'hc4, 1'b1);         // WRAP16 words, crosses 0x100
    add_burst(3'b011, 4, 3'd2, 8'he0, 1'b1);          // INCR4 with a wrong last address
    beats[beats.size() - 1].addr = 8'hf0;
    add_idle(3);
    repeat (4) @(posedge pclk);
    hreset_n = 1'b1;
    preset_n = 1'b1;
    wait (apb_done == total);
    repeat (6) @(posedge pclk);
    checks++; if (expected.size() != 0)  fail("transfers missing on the APB");
    checks++; if (exp_rdata.size() != 0) fail("read results missing");
    checks++; if (n_err != exp_err || exp_err == 0) fail($sformatf("xfer_err %0d of %0d", n_err, exp_err));
    checks++; if (n_addr_err != 1)       fail($sformatf("addr_err %0d", n_addr_err));
    checks++; if (n_stall == 0)          fail("no AHB stall on a full FIFO");
    checks++; if (n_wait == 0)           fail("no APB wait state");
    checks++; if (n_idle < 2)            fail("APB never went idle between bursts");
    checks++; if (total <= 2 * 16)       fail("FIFO pointers did not wrap");
    checks++; if (n_wrap_cross < 4)      fail("wrapping bursts did not cross their boundary");
    checks++; if (n_read == 0)           fail("no read");
    for (int b = 0; b < 8; b++) begin
      checks++;
      if (n_burst[b] == 0) fail($sformatf("burst type %0d never issued", b));
    end
    $display("transfers=%0d stalls=%0d apb_waits=%0d apb_idles=%0d reads=%0d apb_errors=%0d addr_errors=%0d wrap_crossings=%0d",
             apb_done, n_stall, n_wait, n_idle, n_read, n_err, n_addr_err, n_wrap_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge hclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_afifo: self-checking test of the asynchronous FIFO.
//
// Write clock 10 ns, read clock 27 ns (unrelated). Phase 1 fills the FIFO with no reads and
// checks that full rises after exactly 16 entries, that one more push is refused and
// flagged on push_err_on_full, and that a pop on the empty FIFO is flagged on
// pop_err_on_empty. Phase 2 pushes and pops at random, comparing every popped word with a
// reference queue, through many pointer wrap-arounds. Phase 3 drains the FIFO and checks
// that empty rises once everything written has been read.
module tb_afifo;
  localparam int unsigned DW = 32, AW = 4, DEPTH = 1 << AW;

  logic          clk_w = 1'b0, clk_r = 1'b0, rst_n = 1'b0;
  logic          push = 1'b0, pop = 1'b0;
  logic [DW-1:0] data = '0, out_data;
  logic          full, empty, push_err_on_full, pop_err_on_empty;

  int checks = 0, failures = 0;
  logic [DW-1:0] model [$];
  int pushed = 0, popped = 0, push_errs = 0, pop_errs = 0;

  afifo #(.DATA_W(DW), .ADDR_W(AW)) dut (.*);

  always #5    clk_w = ~clk_w;
  always #13.5 clk_r = ~clk_r;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk_w) if (rst_n && push_err_on_full) push_errs++;
  always @(posedge clk_r) if (rst_n && pop_err_on_empty) pop_errs++;

  // one push on the next write edge (only if not full); returns whether it was taken
  task automatic do_push(input logic [DW-1:0] v, output bit taken);
    @(negedge clk_w);
    push = 1'b1; data = v;
    taken = !full;
    @(posedge clk_w);
    if (taken) begin model.push_back(v); pushed++; end
    #1 push = 1'b0;
  endtask

  bit writer_done = 1'b0;

  initial begin
    bit taken;
    int n;
    repeat (3) @(posedge clk_r);
    rst_n = 1'b1;
    repeat (2) @(posedge clk_r);
    check(empty && !full, "flags after reset");

    // pop on empty
    @(negedge clk_r); pop = 1'b1; @(posedge clk_r); #1 pop = 1'b0;
    repeat (2) @(posedge clk_r);
    check(pop_errs == 1, "pop on empty flagged");

    // phase 1: fill without reading
    n = 0;
    for (int i = 0; i < DEPTH; i++) begin
      check(!full, "not full before depth reached");
      do_push($urandom, taken);
      if (taken) n++;
    end
    @(negedge clk_w);
    check(full, "full after DEPTH pushes");
    check(n == DEPTH, "all DEPTH pushes accepted");
    do_push(32'hdead_beef, taken);
    check(!taken, "push refused when full");
    repeat (2) @(posedge clk_w);
    check(push_errs == 1, "push on full flagged");

    // phase 2: random traffic; the reader (below) now runs
    fork
      begin
        for (int i = 0; i < 400; i++) begin
          if ($urandom_range(0, 2) != 0) do_push($urandom, taken);
          else @(posedge clk_w);
        end
        writer_done = 1'b1;
      end
    join
    wait (popped == pushed);
    repeat (4) @(posedge clk_r);
    check(empty, "empty after draining");
    check(model.size() == 0, "nothing left in the model");
    check(pushed > 3 * DEPTH, "pointers wrapped several times");
    check(push_errs >= 1 && pop_errs == 1, "no unexpected pop errors");
    $display("pushed=%0d popped=%0d", pushed, popped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader: starts once phase 1 is over, pops whenever the FIFO is not empty
  initial begin
    wait (push_errs == 1);
    forever begin
      @(negedge clk_r);
      pop = !empty && ($urandom_range(0, 3) != 0);
      if (pop) begin
        checks++;
        if (model.size() == 0) begin
          failures++; $display("FAIL pop with empty model");
        end else begin
          if (out_data != model[0]) begin
            failures++;
            $display("FAIL data %h expected %h", out_data, model[0]);
          end
          void'(model.pop_front());
          popped++;
        end
      end
      @(posedge clk_r);
      #1 pop = 1'b0;
    end
  end

  initial begin
    repeat (20000) @(posedge clk_w);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

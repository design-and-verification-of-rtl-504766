// afifo: asynchronous FIFO that carries data from a fast write clock to a slower read clock.
//
// This is the clock-domain-crossing core of the bridge. The writer (clk_w, HCLK) stores an
// entry per push; the reader (clk_r, PCLK) takes one per pop, so a burst written faster
// than it can be read waits in the memory instead of being lost. Each side keeps its own
// pointer (gray_ptr), binary for addressing the memory and Gray-coded for crossing: the
// write pointer reaches the read side, and the read pointer the write side, through a
// two-flop synchronizer (sync_ff). Pointers are one bit wider than the memory address:
//   empty (read side):  next read Gray pointer equals the synchronized write pointer;
//   full  (write side): next write Gray pointer equals the synchronized read pointer with
//                       its two top bits inverted.
// Both flags are registered and pessimistic: the synchronizer delay can only make the FIFO
// look fuller or emptier than it is, never the reverse.
//
// A push while full or a pop while empty is ignored and reported for one cycle of its own
// clock on push_err_on_full or pop_err_on_empty (port names as the bridge's schematic
// prints them). The read data out_data is the oldest entry, valid whenever empty is low
// (first-word fall-through); pop removes it on the next clk_r edge.
//
// Reset: one asynchronous active-low rst_n clears both sides, as the schematic shows a
// single rst_n; it must be held until both clocks have run at least one edge.
// Sizes: DATA_W bits per entry (default 32, as printed), 2**ADDR_W entries (default 16,
// this design's choice: room for a whole 16-beat AHB burst).
module afifo #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 4
) (
  // write side (clk_w)
  input  logic              clk_w,
  input  logic              push,
  input  logic [DATA_W-1:0] data,
  output logic              full,
  output logic              push_err_on_full,
  // read side (clk_r)
  input  logic              clk_r,
  input  logic              pop,
  output logic [DATA_W-1:0] out_data,
  output logic              empty,
  output logic              pop_err_on_empty,
  // both
  input  logic              rst_n
);

  localparam int unsigned PW = ADDR_W + 1;

  logic          wr_en, rd_en;
  logic [PW-1:0] wbin, wgray, wgray_next;
  logic [PW-1:0] rbin, rgray, rgray_next;
  logic [PW-1:0] wgray_in_r;   // write pointer as seen on the read side
  logic [PW-1:0] rgray_in_w;   // read pointer as seen on the write side

  assign wr_en = push && !full;
  assign rd_en = pop  && !empty;

  gray_ptr #(.W(PW)) u_wptr (
    .clk(clk_w), .rst_n, .inc(wr_en),
    .bin(wbin), .gray(wgray), .gray_next(wgray_next)
  );

  gray_ptr #(.W(PW)) u_rptr (
    .clk(clk_r), .rst_n, .inc(rd_en),
    .bin(rbin), .gray(rgray), .gray_next(rgray_next)
  );

  sync_ff #(.W(PW)) u_sync_w2r (.clk(clk_r), .rst_n, .d(wgray), .q(wgray_in_r));
  sync_ff #(.W(PW)) u_sync_r2w (.clk(clk_w), .rst_n, .d(rgray), .q(rgray_in_w));

  fifo_mem #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_mem (
    .wclk(clk_w), .wen(wr_en), .waddr(wbin[ADDR_W-1:0]), .wdata(data),
    .raddr(rbin[ADDR_W-1:0]), .rdata(out_data)
  );

  // Write side: full flag and push error.
  always_ff @(posedge clk_w or negedge rst_n) begin
    if (!rst_n) begin
      full             <= 1'b0;
      push_err_on_full <= 1'b0;
    end else begin
      full             <= (wgray_next == {~rgray_in_w[PW-1:PW-2], rgray_in_w[PW-3:0]});
      push_err_on_full <= push && full;
    end
  end

  // Read side: empty flag and pop error.
  always_ff @(posedge clk_r or negedge rst_n) begin
    if (!rst_n) begin
      empty            <= 1'b1;
      pop_err_on_empty <= 1'b0;
    end else begin
      empty            <= (rgray_next == wgray_in_r);
      pop_err_on_empty <= pop && empty;
    end
  end

  // The Gray pointers must move by at most one bit per edge, or the synchronizers could
  // capture an invalid value.
  property p_one_bit_step(logic clk, logic [PW-1:0] g);
    @(posedge clk) disable iff (!rst_n) $countones(g ^ $past(g)) <= 1;
  endproperty
  a_wgray_step: assert property (p_one_bit_step(clk_w, wgray));
  a_rgray_step: assert property (p_one_bit_step(clk_r, rgray));

  initial assert (ADDR_W >= 1) else $error("afifo needs ADDR_W >= 1");

endmodule

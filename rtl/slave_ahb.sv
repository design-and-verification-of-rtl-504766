// slave_ahb: AHB slave front end of the bridge, in the HCLK domain.
//
// It takes transfers from an AHB master and turns each one into a FIFO entry {write,
// address, data} that the APB side will carry out later. AHB is pipelined: a transfer's
// address and control (haddr, hwrite, htrans, hsize, hburst) come in its address phase,
// and its write data (hwdata) one cycle later, in its data phase. The slave registers the
// address phase of every NONSEQ or SEQ transfer addressed to it (hsel and hready high) and
// pushes the entry in the data phase (push, with the entry on hwdata_out). Reads are pushed
// too, with zero data; their APB read data comes out on the APB side.
//
// Flow control: when the FIFO is full during a data phase, hreadyout is driven low and the
// data phase is stretched until space frees up, so no transfer is dropped. hready is the
// bus's HREADY, which with this slave alone is hreadyout fed back. IDLE and BUSY transfers
// are answered with zero wait states and push nothing. Responses are always OKAY, so no
// HRESP port is kept.
//
// Bursts: from hsize and hburst the slave works out where the next beat of a burst must
// be (incrementing, or wrapping at a boundary of beats x size bytes). A SEQ beat at any
// other address raises addr_err for one cycle; the beat itself is still passed on.
//
// Timing: push is high in the last cycle of a transfer's data phase, i.e. on the edge that
// ends it. hreset_n is asynchronous, active low.
module slave_ahb
  import bridge_pkg::*;
(
  input  logic              hclk,
  input  logic              hreset_n,
  input  logic              hsel,
  input  logic              hready,
  input  logic              hwrite,
  input  logic [2:0]        hsize,
  input  logic [2:0]        hburst,
  input  logic [1:0]        htrans,
  input  logic [DATA_W-1:0] hwdata,
  input  logic [ADDR_W-1:0] haddr,
  output logic              hreadyout,
  output logic              addr_err,
  // FIFO write side
  input  logic              full,
  output logic              push,
  output xfer_t             hwdata_out
);

  htrans_e           trans;
  logic              addr_phase;      // a valid transfer is in its address phase now
  logic              dp_valid;        // a transfer is in its data phase
  logic              dp_write;
  logic [ADDR_W-1:0] dp_addr;
  logic [ADDR_W-1:0] exp_addr;        // where the next SEQ beat must be
  logic              exp_valid;

  assign trans      = htrans_e'(htrans);
  assign addr_phase = hsel && hready && (trans == HTRANS_NONSEQ || trans == HTRANS_SEQ);

  assign hreadyout = !(dp_valid && full);
  assign push      = dp_valid && !full;

  always_comb begin
    hwdata_out.write = dp_write;
    hwdata_out.addr  = dp_addr;
    hwdata_out.data  = dp_write ? hwdata : '0;
  end

  always_ff @(posedge hclk or negedge hreset_n) begin
    if (!hreset_n) begin
      dp_valid  <= 1'b0;
      dp_write  <= 1'b0;
      dp_addr   <= '0;
      exp_addr  <= '0;
      exp_valid <= 1'b0;
      addr_err  <= 1'b0;
    end else begin
      addr_err <= 1'b0;
      if (hready) begin
        dp_valid <= addr_phase;
        if (addr_phase) begin
          dp_write <= hwrite;
          dp_addr  <= haddr;
        end
      end
      if (hsel && hready) begin
        if (trans == HTRANS_NONSEQ || trans == HTRANS_SEQ) begin
          exp_addr  <= burst_next_addr(haddr, hsize, hburst);
          exp_valid <= 1'b1;
          if (trans == HTRANS_SEQ && (!exp_valid || haddr != exp_addr)) addr_err <= 1'b1;
        end else if (trans == HTRANS_IDLE) begin
          exp_valid <= 1'b0;
        end
      end
    end
  end

  // A stalled data phase must hold until the FIFO accepts it; a push never meets a full FIFO.
  a_no_push_when_full: assert property (@(posedge hclk) disable iff (!hreset_n) push |-> !full);
  a_stall_holds: assert property (@(posedge hclk) disable iff (!hreset_n)
                                  (dp_valid && !hreadyout) |=> dp_valid && $stable(dp_addr));

endmodule

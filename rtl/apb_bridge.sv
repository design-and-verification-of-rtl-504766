// apb_bridge: APB master back end of the bridge, in the PCLK domain.
//
// It takes transfers out of the asynchronous FIFO and performs them on the APB. Each
// transfer is the usual two-phase APB sequence: a SETUP cycle (psel high, penable low) with
// address, direction and write data already driven, then ACCESS cycles (psel and penable
// high) until the peripheral raises pready. When the FIFO still holds work at the end of an
// ACCESS, the next SETUP follows at once; otherwise the master returns to IDLE.
//
// FIFO side: the entry is read combinationally from the FIFO output (paddr_in, pwrite_in,
// pwdata_in, valid while empty is low) and registered onto the bus as the master leaves
// IDLE or ACCESS; pop is raised in that same cycle to remove it. A write therefore takes
// two PCLK cycles plus the wait states the peripheral inserts.
//
// Results: for a read, prdata is captured at the end of ACCESS and presented on prdata_out
// with rdata_valid high for one PCLK cycle. pslverr at the end of ACCESS is reported on
// xfer_err for one cycle. The port names follow the APB master's block diagram and the
// bridge's schematic; the result ports are this design's own.
// preset_n is asynchronous, active low.
module apb_bridge
  import bridge_pkg::*;
(
  input  logic              pclk,
  input  logic              preset_n,
  // FIFO read side
  input  logic              empty,
  input  logic              pwrite_in,
  input  logic [ADDR_W-1:0] paddr_in,
  input  logic [DATA_W-1:0] pwdata_in,
  output logic              pop,
  // APB
  input  logic              pready,
  input  logic [DATA_W-1:0] prdata,
  input  logic              pslverr,
  output logic              psel,
  output logic              penable,
  output logic              pwrite,
  output logic [ADDR_W-1:0] paddr,
  output logic [DATA_W-1:0] pwdata,
  // results
  output logic [DATA_W-1:0] prdata_out,
  output logic              rdata_valid,
  output logic              xfer_err
);

  typedef enum logic [1:0] {IDLE, SETUP, ACCESS} state_e;

  state_e state, state_next;
  logic   done;     // ACCESS ends on this edge

  assign done = (state == ACCESS) && pready;
  assign pop  = !empty && (state == IDLE || done);

  always_comb begin
    state_next = state;
    unique case (state)
      IDLE:    if (!empty) state_next = SETUP;
      SETUP:   state_next = ACCESS;
      ACCESS:  if (pready) state_next = empty ? IDLE : SETUP;
      default: state_next = IDLE;
    endcase
  end

  always_ff @(posedge pclk or negedge preset_n) begin
    if (!preset_n) begin
      state       <= IDLE;
      pwrite      <= 1'b0;
      paddr       <= '0;
      pwdata      <= '0;
      prdata_out  <= '0;
      rdata_valid <= 1'b0;
      xfer_err    <= 1'b0;
    end else begin
      state       <= state_next;
      rdata_valid <= 1'b0;
      xfer_err    <= 1'b0;
      if (pop) begin
        pwrite <= pwrite_in;
        paddr  <= paddr_in;
        pwdata <= pwdata_in;
      end
      if (done) begin
        xfer_err <= pslverr;
        if (!pwrite) begin
          prdata_out  <= prdata;
          rdata_valid <= 1'b1;
        end
      end
    end
  end

  assign psel    = (state == SETUP) || (state == ACCESS);
  assign penable = (state == ACCESS);

  // APB protocol rules for the master.
  a_setup_then_access: assert property (@(posedge pclk) disable iff (!preset_n)
                                        (psel && !penable) |=> (psel && penable));
  a_enable_needs_sel: assert property (@(posedge pclk) disable iff (!preset_n)
                                       penable |-> psel);
  a_stable_in_access: assert property (@(posedge pclk) disable iff (!preset_n)
                                       penable |-> $stable(paddr) && $stable(pwrite) && $stable(pwdata));

endmodule

// ahb2apb_bridge: AHB-to-APB bridge with an asynchronous FIFO between the two clock domains.
//
// The AHB side runs on hclk and the APB side on pclk, with no phase or frequency relation
// between them; hclk is the faster one (for full throughput its period should be at most
// three quarters of pclk's). Three blocks are chained:
//   slave_ahb  (hclk) accepts AHB transfers and pushes {write, address, data} entries;
//   afifo      carries the entries across with Gray-coded, synchronized pointers;
//   apb_bridge (pclk) pops them and runs APB SETUP/ACCESS transfers.
// A burst the APB cannot keep up with waits in the FIFO; only when the FIFO fills does the
// AHB side see wait states (hreadyout low), so no data is lost.
//
// Ports: the AHB and APB signals of the bridge's schematic, plus hsel, hreadyout and
// addr_err on the AHB side, psel, pwrite, pready on the APB side (from the APB master's
// block diagram), the read result (prdata_out, rdata_valid) and the APB error (xfer_err)
// in the pclk domain, and the FIFO's error flags in their own domains. With this bridge as
// the only AHB slave, hready is hreadyout fed back.
// Reset: hreset_n resets the AHB side and the FIFO, preset_n the APB master; assert both
// together, each held for at least one edge of its clock.
module ahb2apb_bridge
  import bridge_pkg::*;
#(
  parameter int unsigned FIFO_ADDR_W = 4   // FIFO depth = 2**FIFO_ADDR_W entries
) (
  // AHB side
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
  output logic              push_err_on_full,
  // APB side
  input  logic              pclk,
  input  logic              preset_n,
  input  logic              pready,
  input  logic [DATA_W-1:0] prdata,
  input  logic              pslverr,
  output logic              psel,
  output logic              penable,
  output logic              pwrite,
  output logic [ADDR_W-1:0] paddr,
  output logic [DATA_W-1:0] pwdata,
  output logic [DATA_W-1:0] prdata_out,
  output logic              rdata_valid,
  output logic              xfer_err,
  output logic              pop_err_on_empty
);

  logic  push, pop, full, empty;
  xfer_t wr_entry, rd_entry;

  slave_ahb ahb_inst (
    .hclk, .hreset_n, .hsel, .hready, .hwrite, .hsize, .hburst, .htrans, .hwdata, .haddr,
    .hreadyout, .addr_err,
    .full, .push, .hwdata_out(wr_entry)
  );

  afifo #(.DATA_W(XFER_W), .ADDR_W(FIFO_ADDR_W)) afifo_inst (
    .clk_w(hclk), .push, .data(wr_entry), .full, .push_err_on_full,
    .clk_r(pclk), .pop, .out_data(rd_entry), .empty, .pop_err_on_empty,
    .rst_n(hreset_n)
  );

  apb_bridge apb_inst (
    .pclk, .preset_n,
    .empty, .pwrite_in(rd_entry.write), .paddr_in(rd_entry.addr), .pwdata_in(rd_entry.data),
    .pop,
    .pready, .prdata, .pslverr,
    .psel, .penable, .pwrite, .paddr, .pwdata,
    .prdata_out, .rdata_valid, .xfer_err
  );

endmodule

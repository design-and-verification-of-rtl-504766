// bridge_pkg: types and constants shared by the AHB-to-APB bridge.
//
// The bus widths are the ones the bridge's port list prints: an 8-bit address (haddr[7:0],
// paddr[7:0]) and 32-bit data (hwdata[31:0], pwdata[31:0], prdata[31:0]). The AHB transfer,
// burst and size encodings are the standard AMBA AHB ones. The FIFO entry that carries one
// transfer across the clock boundary (direction, address, data) is this design's own choice.
package bridge_pkg;

  localparam int unsigned ADDR_W = 8;
  localparam int unsigned DATA_W = 32;

  // HTRANS encodings (AMBA AHB).
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // HBURST encodings (AMBA AHB): single, undefined-length incrementing, and the
  // 4/8/16-beat wrapping and incrementing bursts.
  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'b000,
    HBURST_INCR   = 3'b001,
    HBURST_WRAP4  = 3'b010,
    HBURST_INCR4  = 3'b011,
    HBURST_WRAP8  = 3'b100,
    HBURST_INCR8  = 3'b101,
    HBURST_WRAP16 = 3'b110,
    HBURST_INCR16 = 3'b111
  } hburst_e;

  // One transfer as it crosses from HCLK to PCLK.
  typedef struct packed {
    logic              write;   // 1: APB write, 0: APB read
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;    // write data; zero for a read
  } xfer_t;

  localparam int unsigned XFER_W = $bits(xfer_t);

  // Reflected binary (Gray) code: gray[i] = bin[i] ^ bin[i+1], with the top bit copied.
  function automatic logic [31:0] bin2gray(input logic [31:0] bin);
    return bin ^ (bin >> 1);
  endfunction

  // Next address of an AHB burst beat: incrementing bursts add the transfer size;
  // wrapping bursts stay inside a boundary of (beats x transfer size) bytes.
  function automatic logic [ADDR_W-1:0] burst_next_addr(input logic [ADDR_W-1:0] addr,
                                                        input logic [2:0]        hsize,
                                                        input logic [2:0]        hburst);
    logic [ADDR_W-1:0] step, wrap_mask, incr;
    step = ADDR_W'(1) << hsize;
    incr = addr + step;
    unique case (hburst)
      HBURST_WRAP4:  wrap_mask = (ADDR_W'(4)  << hsize) - ADDR_W'(1);
      HBURST_WRAP8:  wrap_mask = (ADDR_W'(8)  << hsize) - ADDR_W'(1);
      HBURST_WRAP16: wrap_mask = (ADDR_W'(16) << hsize) - ADDR_W'(1);
      default:       wrap_mask = '1;
    endcase
    return (addr & ~wrap_mask) | (incr & wrap_mask);
  endfunction

endpackage

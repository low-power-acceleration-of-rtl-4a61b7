// ahb_sram: AHB-Lite slave in front of one single-port SRAM (sram_sp). This
// is each of the two main memories of the SoC (96 kB and 32 kB, 32-bit wide).
//
// The native RAM writes in one cycle and returns read data one cycle after
// the address. A read therefore drives the RAM during its AHB address phase
// and the data is ready in the data phase: no wait state. A write's data only
// arrives in the data phase, so the address is registered and the RAM is
// written then. When a read's address phase falls on a write's data phase the
// single port is taken; the read is then performed one cycle later and its
// data phase gets one wait state. Bytes and halfwords are written with byte
// enables. Addresses beyond the memory wrap. Handling of the write/read
// collision is this design's choice.
module ahb_sram
  import ahb_pkg::*;
#(
  parameter int unsigned BYTES = 98304,
  localparam int unsigned DEPTH = BYTES / 4,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ahb_m2s_t req,
  input  logic     hready,
  output ahb_s2m_t rsp
);
  typedef enum logic [1:0] {D_NONE, D_WRITE, D_READ, D_READ_LATE} dphase_e;
  dphase_e         dph;
  logic [AW-1:0]   d_addr;
  logic [3:0]      d_be;

  logic            ram_ce, ram_we;
  logic [3:0]      ram_be;
  logic [AW-1:0]   ram_addr;
  logic [31:0]     ram_rdata;

  wire             accept  = req.hsel && req.htrans[1] && hready;
  wire [AW-1:0]    a_addr  = AW'((req.haddr[31:2]) % DEPTH);

  // RAM port use, in priority: write data phase, late read, new read.
  always_comb begin
    ram_ce = 1'b0; ram_we = 1'b0; ram_be = '0; ram_addr = a_addr;
    if (dph == D_WRITE) begin
      ram_ce = 1'b1; ram_we = 1'b1; ram_be = d_be; ram_addr = d_addr;
    end else if (dph == D_READ_LATE) begin
      ram_ce = 1'b1; ram_addr = d_addr;
    end else if (accept && !req.hwrite) begin
      ram_ce = 1'b1; ram_addr = a_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dph <= D_NONE; d_addr <= '0; d_be <= '0;
    end else if (dph == D_READ_LATE) begin
      dph <= D_READ;                     // data of the late read next cycle
    end else if (hready) begin
      if (!accept)                dph <= D_NONE;
      else if (req.hwrite)        dph <= D_WRITE;
      else if (dph == D_WRITE)    dph <= D_READ_LATE;
      else                        dph <= D_READ;
      if (accept) begin
        d_addr <= a_addr;
        d_be   <= byte_enables(req.hsize, req.haddr[1:0]);
      end
    end
  end

  sram_sp #(.DEPTH(DEPTH), .DW(32)) u_ram (
    .clk, .ce(ram_ce), .we(ram_we), .be(ram_be), .addr(ram_addr),
    .wdata(req.hwdata), .rdata(ram_rdata)
  );

  assign rsp.hrdata = ram_rdata;
  assign rsp.hready = (dph != D_READ_LATE);
  assign rsp.hresp  = 1'b0;
endmodule

// sram_sp: single-port SRAM with the native RAM interface of the compiled
// memory macros: chip enable, write enable, per-byte write enables, address,
// write data and read data. A write takes effect at the clock edge where
// ce&we are high; a read presents the address with ce high and the data
// appears after the next edge and holds until the next read. Contents are not
// reset. Written as an array so synthesis can map it to a macro.
// Following the thesis: the native RAM interface (a write in one cycle, read
// data one cycle after the address) and the 32-bit main memories. This
// design's choice: byte enables, which are needed for byte and halfword
// stores.
module sram_sp #(
  parameter int unsigned DEPTH = 24576,
  parameter int unsigned DW    = 32,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned BW   = (DW + 7) / 8
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          we,
  input  logic [BW-1:0] be,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) begin
        for (int b = 0; b < BW; b++)
          if (be[b])
            for (int i = 8*b; i < 8*b+8 && i < DW; i++) mem[addr][i] <= wdata[i];
      end else begin
        rdata <= mem[addr];
      end
    end
  end
endmodule

// nmc_pkg: constants and types shared by the DMA, the accelerator bridge,
// the accelerator and the core-side custom-instruction units.
//
// DMA control data word (written by the SWC instruction or the register
// port), bit fields as in the DMA programming guide:
//   [31:29] MODE      000 memory -> accelerator, 010 accelerator -> memory,
//                     001 trigger accelerator
//   [28:27] ACC       target accelerator (up to four per DMA)
//   [26:15] ACC_ADDR  start word in the accelerator's private space
//   [14:12] BITSH     memory stride of 2^BITSH words
//   [11:1]  NRTX      number of 32-bit transfers
//   [0]     START     must be 1
// Accelerator word address (ACC_ADDR and the bridge's HADDR[13:2]):
//   [11:10] memory select (IFM, weights/config, OFM, control), [9:0] word.
// The field order and the mode codes follow the DMA programming guide. The
// exact bit positions of ACC_ADDR and the accelerator word-address layout
// are this design's reading of it. The opcodes of the custom instructions
// are this design's choice.
package nmc_pkg;
  typedef enum logic [2:0] {
    MODE_MEM2ACC = 3'b000,
    MODE_TRIGGER = 3'b001,
    MODE_ACC2MEM = 3'b010
  } dma_mode_e;

  typedef struct packed {
    logic [2:0]  mode;
    logic [1:0]  acc;
    logic [11:0] acc_addr;
    logic [2:0]  bitsh;
    logic [10:0] nrtx;
    logic        start;
  } dma_ctrl_t;

  typedef enum logic [1:0] {
    SEL_IFM  = 2'd0,
    SEL_WGT  = 2'd1,
    SEL_OFM  = 2'd2,
    SEL_CTRL = 2'd3
  } acc_sel_e;

  // Byte address of accelerator `acc`, word `word` on the DMA's accelerator bus.
  function automatic logic [31:0] acc_byte_addr(logic [1:0] acc, logic [11:0] word);
    return {16'h0, acc, word, 2'b00};
  endfunction

  // Custom instruction encodings (RISC-V custom-0 / custom-1 opcode space).
  localparam logic [6:0] OPC_SWC = 7'b0001011;
  localparam logic [6:0] OPC_MAC = 7'b0101011;
endpackage

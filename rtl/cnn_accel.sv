// cnn_accel: the near-memory CNN accelerator. Three 2 kB memories of 16-bit
// words - the input feature map (single port), the weight/configuration
// memory (single port) and the output feature map (dual port) - around the
// convolution engine (cnn_engine).
//
// Outside access is a native RAM port: mem_sel picks the memory (0 IFM,
// 1 weights/config, 2 OFM, 3 control), ce/we/addr/wdata as for a RAM, read
// data one cycle after the address. Control word 0: writing bit 0 = 1 starts
// an inference; reading it returns {done, busy} in bits [1:0]. While busy the
// engine owns the IFM and weight memories and the OFM write port; outside
// IFM/weight accesses are then ignored (the bus bridge holds them off).
// The three memories and their sizes follow the accelerator description;
// the select encoding and the control word are this design's own.
module cnn_accel
  import nmc_pkg::*;
#(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  acc_sel_e      mem_sel,
  input  logic          ce,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  output logic          busy,
  output logic          done
);
  logic          e_ifm_ce, e_w_ce, e_ofm_we;
  logic [AW-1:0] e_ifm_addr, e_w_addr, e_ofm_addr;
  logic [DW-1:0] e_ofm_wdata;
  logic [DW-1:0] ifm_rdata, w_rdata, ofm_rdata;

  wire x_ifm = ce && mem_sel == SEL_IFM && !busy;
  wire x_w   = ce && mem_sel == SEL_WGT && !busy;
  wire x_ofm = ce && mem_sel == SEL_OFM && !we;
  wire start = ce && we && mem_sel == SEL_CTRL && addr == '0 && wdata[0] && !busy;

  cnn_engine #(.AW(AW), .DW(DW)) u_engine (
    .clk, .rst_n, .start, .busy, .done,
    .ifm_ce(e_ifm_ce), .ifm_addr(e_ifm_addr), .ifm_rdata(ifm_rdata),
    .w_ce(e_w_ce), .w_addr(e_w_addr), .w_rdata(w_rdata),
    .ofm_we(e_ofm_we), .ofm_addr(e_ofm_addr), .ofm_wdata(e_ofm_wdata)
  );

  sram_sp #(.DEPTH(2**AW), .DW(DW)) u_ifm (
    .clk, .ce(busy ? e_ifm_ce : x_ifm), .we(busy ? 1'b0 : we), .be('1),
    .addr(busy ? e_ifm_addr : addr), .wdata, .rdata(ifm_rdata)
  );

  sram_sp #(.DEPTH(2**AW), .DW(DW)) u_wgt (
    .clk, .ce(busy ? e_w_ce : x_w), .we(busy ? 1'b0 : we), .be('1),
    .addr(busy ? e_w_addr : addr), .wdata, .rdata(w_rdata)
  );

  sram_dp #(.DEPTH(2**AW), .DW(DW)) u_ofm (
    .clk, .a_we(e_ofm_we), .a_addr(e_ofm_addr), .a_wdata(e_ofm_wdata),
    .b_ce(x_ofm), .b_addr(addr), .b_rdata(ofm_rdata)
  );

  // read-data select follows the memory read in the previous cycle
  acc_sel_e      rsel;
  logic [DW-1:0] status;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsel <= SEL_IFM; status <= '0;
    end else if (ce && !we) begin
      rsel   <= mem_sel;
      status <= DW'({done, busy});
    end
  end

  always_comb begin
    case (rsel)
      SEL_IFM: rdata = ifm_rdata;
      SEL_WGT: rdata = w_rdata;
      SEL_OFM: rdata = ofm_rdata;
      default: rdata = status;
    endcase
  end
endmodule

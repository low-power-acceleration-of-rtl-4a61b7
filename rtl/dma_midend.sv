// dma_midend: the DMA controller. It polls the front-end queue and runs one
// request at a time:
//   MODE 000  NRTX words from memory (start address, stride 2^BITSH words)
//             to accelerator ACC, words ACC_ADDR, ACC_ADDR+1, ...
//   MODE 010  NRTX words from accelerator ACC (from ACC_ADDR) to memory
//             (start address, stride 2^BITSH words); irq pulses for one
//             cycle when the last write has completed
//   MODE 001  one write of 1 to the accelerator's control word (start)
// Other MODE codes are dropped. Reads go to the source back-end and writes to
// the destination back-end; a two-word buffer between them lets the next read
// overlap the current write, and the controller can hand a request to either
// back-end in any cycle, so the back-ends set the pace. The mode meanings and
// field layout follow the DMA programming guide; the overlap buffer and the
// irq pulse are this design's choices.
module dma_midend
  import nmc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        q_valid,
  input  logic [31:0] q_addr,
  input  dma_ctrl_t   q_ctrl,
  output logic        q_pop,
  // memory-side back-end
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output logic        mem_req_write,
  output logic [31:0] mem_req_addr,
  output logic [31:0] mem_req_wdata,
  input  logic        mem_rsp_valid,
  input  logic [31:0] mem_rsp_rdata,
  input  logic        mem_idle,
  // accelerator-side back-end
  output logic        acc_req_valid,
  input  logic        acc_req_ready,
  output logic        acc_req_write,
  output logic [31:0] acc_req_addr,
  output logic [31:0] acc_req_wdata,
  input  logic        acc_rsp_valid,
  input  logic [31:0] acc_rsp_rdata,
  input  logic        acc_idle,
  output logic        busy,
  output logic        irq
);
  logic        run, trig, src_mem;
  dma_mode_e   mode;
  logic [1:0]  acc;
  logic [2:0]  bitsh;
  logic [10:0] nrtx, rd_cnt, wr_cnt;
  logic [11:0] acc_rd, acc_wr;        // accelerator word pointers
  logic [31:0] mem_rd, mem_wr;        // memory byte pointers
  logic        rd_out;                // read issued, data not yet back

  // data buffer between the two back-ends
  logic        b_push, b_pop, b_empty, b_full;
  logic [31:0] b_dout;
  logic [1:0]  b_count;

  wire [31:0] step = 32'd4 << bitsh;

  wire rd_valid = run && !trig && rd_cnt < nrtx && !rd_out && ({1'b0, b_count} + 3'(rd_out)) < 3'd2;
  wire wr_valid = run && wr_cnt < nrtx && (trig || !b_empty);
  wire [31:0] wr_data = trig ? 32'd1 : b_dout;
  wire [31:0] acc_rd_a = acc_byte_addr(acc, acc_rd);
  wire [31:0] acc_wr_a = trig ? acc_byte_addr(acc, {SEL_CTRL, 10'd0}) : acc_byte_addr(acc, acc_wr);

  // route reader/writer to the back-ends
  always_comb begin
    if (src_mem) begin
      mem_req_valid = rd_valid; mem_req_write = 1'b0; mem_req_addr = mem_rd; mem_req_wdata = '0;
      acc_req_valid = wr_valid; acc_req_write = 1'b1; acc_req_addr = acc_wr_a; acc_req_wdata = wr_data;
    end else begin
      acc_req_valid = rd_valid; acc_req_write = 1'b0; acc_req_addr = acc_rd_a; acc_req_wdata = '0;
      mem_req_valid = wr_valid; mem_req_write = 1'b1; mem_req_addr = mem_wr; mem_req_wdata = wr_data;
    end
  end

  wire rd_fire = rd_valid && (src_mem ? mem_req_ready : acc_req_ready);
  wire wr_fire = wr_valid && (src_mem ? acc_req_ready : mem_req_ready);
  wire rd_back = src_mem ? mem_rsp_valid : acc_rsp_valid;
  assign b_push = run && rd_back;
  assign b_pop  = wr_fire && !trig;
  wire finish   = run && wr_cnt == nrtx && (src_mem ? acc_idle : mem_idle) && !wr_valid;

  sync_fifo #(.W(32), .DEPTH(2)) u_buf (
    .clk, .rst_n, .push(b_push), .din(src_mem ? mem_rsp_rdata : acc_rsp_rdata),
    .pop(b_pop), .dout(b_dout), .full(b_full), .empty(b_empty), .count(b_count)
  );

  assign q_pop = !run && q_valid;
  assign busy  = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; trig <= 1'b0; src_mem <= 1'b1; mode <= MODE_MEM2ACC; acc <= '0;
      bitsh <= '0; nrtx <= '0; rd_cnt <= '0; wr_cnt <= '0; acc_rd <= '0; acc_wr <= '0;
      mem_rd <= '0; mem_wr <= '0; rd_out <= 1'b0; irq <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (q_pop) begin
        mode    <= dma_mode_e'(q_ctrl.mode);
        acc     <= q_ctrl.acc;
        bitsh   <= q_ctrl.bitsh;
        acc_rd  <= q_ctrl.acc_addr;
        acc_wr  <= q_ctrl.acc_addr;
        mem_rd  <= q_addr;
        mem_wr  <= q_addr;
        rd_cnt  <= '0;
        wr_cnt  <= '0;
        rd_out  <= 1'b0;
        case (q_ctrl.mode)
          MODE_MEM2ACC: begin run <= 1'b1; trig <= 1'b0; src_mem <= 1'b1; nrtx <= q_ctrl.nrtx; end
          MODE_ACC2MEM: begin run <= 1'b1; trig <= 1'b0; src_mem <= 1'b0; nrtx <= q_ctrl.nrtx; end
          MODE_TRIGGER: begin run <= 1'b1; trig <= 1'b1; src_mem <= 1'b1; nrtx <= 11'd1; end
          default:      run <= 1'b0;
        endcase
      end else if (run) begin
        if (rd_fire) begin
          rd_out <= 1'b1;
          rd_cnt <= rd_cnt + 11'd1;
          if (src_mem) mem_rd <= mem_rd + step;
          else         acc_rd <= acc_rd + 12'd1;
        end
        if (rd_back) rd_out <= 1'b0;
        if (wr_fire) begin
          wr_cnt <= wr_cnt + 11'd1;
          if (src_mem) acc_wr <= acc_wr + 12'd1;
          else         mem_wr <= mem_wr + step;
        end
        if (finish) begin
          run <= 1'b0;
          irq <= (mode == MODE_ACC2MEM);
        end
      end
    end
  end

  a_buf_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(b_push && b_full && !b_pop));
endmodule

// cnn_engine: the compute part of the CNN accelerator. On start it reads its
// configuration from the first four words of the weight memory (image size N
// = 8, 16 or 32; input channels C; filters F; fixed-point shift SH) and then
// produces, for every filter, a 3x3 convolution over all C channels with one
// pixel of zero padding (N x N outputs), adds the filter's bias, rescales,
// saturates to 16 bits, applies ReLU and a 2x2/stride-2 max-pool, and writes
// the (N/2) x (N/2) pooled map to the OFM memory.
//
// It has a single multiplier and walks the four pixels of one pooling window
// at a time, so only one pooled value is kept. Each memory read is issued one
// cycle ahead of the multiply-accumulate that uses it (one-cycle RAM latency).
// Per pooled output: 4 x (9C + 2) + 1 cycles; start and configuration add 6,
// so an inference takes 6 + F*(N/2)^2*(4*(9C+2)+1) cycles (5766 for the
// 8x8 image, one channel, eight filters).
//
// Memory layouts (16-bit signed words):
//   IFM   : c*N*N + y*N + x
//   WGT   : 0 N, 1 C, 2 F, 3 SH; filter f at 4 + f*(9C+1): 9C weights in
//           (c, ky, kx) order, then the bias
//   OFM   : f*(N/2)^2 + py*(N/2) + px
// Output pixel: sat16((sum(x*w) + (bias << SH)) >>> SH), then ReLU, then max.
// The operations and Table 4.1's sizes follow the accelerator description;
// the single-MAC schedule, number format and layouts are this design's own.
module cnn_engine #(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic                 ifm_ce,
  output logic [AW-1:0]        ifm_addr,
  input  logic signed [DW-1:0] ifm_rdata,
  output logic                 w_ce,
  output logic [AW-1:0]        w_addr,
  input  logic signed [DW-1:0] w_rdata,
  output logic                 ofm_we,
  output logic [AW-1:0]        ofm_addr,
  output logic [DW-1:0]        ofm_wdata
);
  localparam int ACCW = 2*DW + 16;
  typedef enum logic [2:0] {S_IDLE, S_CFG, S_MAC, S_BIAS, S_ACC, S_WR} state_e;
  state_e state;

  logic [2:0]  cfg_cnt;
  logic [2:0]  lgn;             // log2 N
  logic [8:0]  n_c, n_f;        // channels, filters (1..256)
  logic [4:0]  sh;
  logic [8:0]  f, c;
  logic [4:0]  py, px;
  logic [1:0]  q, ky, kx;
  logic [AW-1:0] wbase, wk;     // filter base, offset inside filter

  logic signed [ACCW-1:0] acc;
  logic                   vld_d, inb_d;
  logic [DW-1:0]          pool;

  // current output and input pixel coordinates
  logic [5:0]        n, half;
  logic signed [7:0] oy, ox, iy, ix;
  logic              inb;
  always_comb begin
    n    = 6'd1 << lgn;
    half = n >> 1;
    oy   = 8'(signed'({1'b0, py, q[1]}));
    ox   = 8'(signed'({1'b0, px, q[0]}));
    iy   = oy + 8'(ky) - 8'sd1;
    ix   = ox + 8'(kx) - 8'sd1;
    inb  = (iy >= 0) && (ix >= 0) && (iy < 8'(n)) && (ix < 8'(n));
  end

  wire last_k  = (kx == 2'd2) && (ky == 2'd2) && (c == n_c - 9'd1);
  wire last_px = (px == 5'(half - 6'd1));
  wire last_py = (py == 5'(half - 6'd1));
  wire last_f  = (f == n_f - 9'd1);

  // memory addresses
  always_comb begin
    ifm_ce   = (state == S_MAC) && inb;
    ifm_addr = AW'((32'(c) << (2*lgn)) + (32'(iy[5:0]) << lgn) + 32'(ix[5:0]));
    w_ce     = (state == S_CFG && cfg_cnt < 3'd4) || state == S_MAC || state == S_BIAS;
    w_addr   = (state == S_CFG) ? AW'(cfg_cnt) : wbase + wk;
    ofm_we   = (state == S_WR);
    ofm_addr = AW'((32'(f) << (2*lgn - 2)) + (32'(py) << (lgn - 1)) + 32'(px));
    ofm_wdata = pool;
  end

  // final value of one convolution output
  logic signed [ACCW-1:0] sum, scaled;
  logic signed [DW-1:0]   sat, relu;
  always_comb begin
    sum    = acc + (ACCW'(w_rdata) <<< sh);
    scaled = sum >>> sh;
    if (scaled > ACCW'(2**(DW-1) - 1))        sat = {1'b0, {(DW-1){1'b1}}};
    else if (scaled < -ACCW'(2**(DW-1)))      sat = {1'b1, {(DW-1){1'b0}}};
    else                                      sat = scaled[DW-1:0];
    relu = sat[DW-1] ? '0 : sat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; busy <= 1'b0; done <= 1'b0; cfg_cnt <= '0;
      lgn <= 3'd3; n_c <= 9'd1; n_f <= 9'd1; sh <= '0;
      f <= '0; c <= '0; py <= '0; px <= '0; q <= '0; ky <= '0; kx <= '0;
      wbase <= '0; wk <= '0; acc <= '0; vld_d <= 1'b0; inb_d <= 1'b0; pool <= '0;
    end else begin
      vld_d <= 1'b0;
      if (vld_d && inb_d) acc <= acc + ACCW'(ifm_rdata * w_rdata);
      case (state)
        S_IDLE: if (start) begin
          state <= S_CFG; busy <= 1'b1; done <= 1'b0; cfg_cnt <= '0;
        end
        S_CFG: begin
          cfg_cnt <= cfg_cnt + 3'd1;
          case (cfg_cnt)
            3'd1: lgn <= (w_rdata == 16'd32) ? 3'd5 : (w_rdata == 16'd16) ? 3'd4 : 3'd3;
            3'd2: n_c <= (w_rdata == 0) ? 9'd1 : (w_rdata > 256) ? 9'd256 : 9'(w_rdata);
            3'd3: n_f <= (w_rdata == 0) ? 9'd1 : (w_rdata > 256) ? 9'd256 : 9'(w_rdata);
            3'd4: begin
              sh <= w_rdata[4:0];
              state <= S_MAC; f <= '0; py <= '0; px <= '0; q <= '0;
              c <= '0; ky <= '0; kx <= '0; wbase <= AW'(4); wk <= '0;
              acc <= '0; pool <= '0;
            end
            default: ;
          endcase
        end
        S_MAC: begin
          vld_d <= 1'b1; inb_d <= inb;
          wk <= wk + 1'b1;
          if (last_k) state <= S_BIAS;
          if (kx == 2'd2) begin
            kx <= '0;
            if (ky == 2'd2) begin ky <= '0; c <= c + 9'd1; end
            else ky <= ky + 2'd1;
          end else kx <= kx + 2'd1;
        end
        S_BIAS: state <= S_ACC;                // bias read issued at wbase+9C
        S_ACC: begin                            // bias in w_rdata, acc complete
          acc  <= '0;
          if (relu > pool) pool <= relu;
          c <= '0; ky <= '0; kx <= '0; wk <= '0;
          q <= q + 2'd1;
          state <= (q == 2'd3) ? S_WR : S_MAC;
        end
        S_WR: begin
          pool <= '0;
          if (last_px) begin
            px <= '0;
            if (last_py) begin
              py <= '0;
              wbase <= wbase + AW'(9*32'(n_c) + 1);
              f <= f + 9'd1;
              if (last_f) begin
                state <= S_IDLE; busy <= 1'b0; done <= 1'b1;
              end else state <= S_MAC;
            end else begin py <= py + 5'd1; state <= S_MAC; end
          end else begin px <= px + 5'd1; state <= S_MAC; end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

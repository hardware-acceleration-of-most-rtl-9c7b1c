// control_loop: the control kernel. It walks over all block positions of the
// image, reads each 16x16 block of every image from global memory and sends the
// block descriptor and the pixel rows to the computation kernel through two
// channels.
//
// Block positions: cfg_p (called P or S in the algorithm) positions per side,
// image side 4*cfg_p pixels. Positions are visited row-major, column index
// counting fastest, cfg_p*cfg_p in all; block (ix, iy) starts at pixel row
// 4*ix and column 4*iy. A position is in range when 4*ix < 4*cfg_p - 15 and
// 4*iy < 4*cfg_p - 15, the limit test of the algorithm; an out-of-range
// position sends its descriptor only, and its results are zero. The walk, the
// limit and the two channels (descriptor and data) follow the design; the
// row/column counters (in place of the modulo arithmetic of the reference
// kernel), the fixed-function memory port and the credit scheme are this
// design's choices.
//
// Memory: one read request per block row (rd_valid/rd_ready/rd_addr, rd_addr
// the pixel address row*(4*cfg_p)+col of the row's first pixel, the same in
// every image). The memory returns the 16 pixels of that row of every image,
// in request order, on rsp_valid/rsp_data, any number of cycles later and with
// no back-pressure. The returned rows go straight into the data channel (the
// data outputs are the response inputs, unregistered), so the loop issues a
// request only when it holds a credit: it starts with
// DATA_DEPTH credits, spends one per request and gets one back each time the
// reader pops the data channel (data_pop). The data channel therefore never
// overflows.
//
// Timing: after start, one cycle per descriptor and one request per cycle
// while credits and memory allow, so an in-range block is issued in 17 cycles
// when nothing stalls. done rises for one cycle when the last request (or
// last descriptor) has been issued.
module control_loop
  import mad_pkg::*;
#(
  parameter int unsigned NUM_IMG    = 2,
  parameter int unsigned DATA_DEPTH = 32
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic [IDX_W-1:0]                  cfg_p,
  output logic                              busy,
  output logic                              done,
  // descriptor channel
  output logic                              hdr_valid,
  input  logic                              hdr_ready,
  output blk_hdr_t                          hdr,
  // global memory read port
  output logic                              rd_valid,
  input  logic                              rd_ready,
  output logic [ADDR_W-1:0]                 rd_addr,
  input  logic                              rsp_valid,
  input  logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] rsp_data,
  // data channel (write side) and its credit return
  output logic                              dat_valid,
  input  logic                              dat_ready,
  output logic [NUM_IMG-1:0][BLK-1:0][PIX_W-1:0] dat_data,
  input  logic                              data_pop
);
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_READ} state_e;

  localparam int unsigned CW = $clog2(DATA_DEPTH + 1);

  state_e           state;
  logic [IDX_W-1:0] row, col, p_q;
  logic [3:0]       ib;
  logic [CW-1:0]    credits;
  logic             in_range, last_pos, rd_fire, hdr_fire;

  assign in_range = (IDX_W'(row + 4) <= p_q) && (IDX_W'(col + 4) <= p_q);
  assign last_pos = (row == p_q - 1'b1) && (col == p_q - 1'b1);

  assign hdr_valid    = (state == S_HDR);
  assign hdr.in_range = in_range;
  assign hdr.ix       = row;
  assign hdr.iy       = col;
  assign hdr_fire     = hdr_valid && hdr_ready;

  assign rd_valid = (state == S_READ) && (credits != '0);
  assign rd_fire  = rd_valid && rd_ready;
  assign rd_addr  = ADDR_W'(((ADDR_W'(row) << 2) + ADDR_W'(ib)) * (ADDR_W'(p_q) << 2)
                            + (ADDR_W'(col) << 2));

  assign dat_valid = rsp_valid;
  assign dat_data  = rsp_data;
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      row     <= '0;
      col     <= '0;
      p_q     <= '0;
      ib      <= '0;
      done    <= 1'b0;
      credits <= CW'(DATA_DEPTH);
    end else begin
      done    <= 1'b0;
      credits <= credits - CW'(rd_fire) + CW'(data_pop);
      unique case (state)
        S_IDLE: if (start && cfg_p != '0) begin
          p_q   <= cfg_p;
          row   <= '0;
          col   <= '0;
          state <= S_HDR;
        end
        S_HDR: if (hdr_fire) begin
          if (in_range) begin
            ib    <= '0;
            state <= S_READ;
          end else if (last_pos) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            if (col == p_q - 1'b1) begin
              col <= '0;
              row <= row + 1'b1;
            end else begin
              col <= col + 1'b1;
            end
          end
        end
        S_READ: if (rd_fire) begin
          ib <= ib + 1'b1;
          if (ib == 4'(BLK - 1)) begin
            if (last_pos) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              state <= S_HDR;
              if (col == p_q - 1'b1) begin
                col <= '0;
                row <= row + 1'b1;
              end else begin
                col <= col + 1'b1;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Returned rows must always find room in the data channel.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  rsp_valid |-> dat_ready);
endmodule

// rle_pe: reconfigurable module 2 of the JPEG dataflow, run-length encoding.
//
// Three steps per 8x8 block of quantized coefficients:
//   - zig-zag scan: the 64 coefficients are visited in zig-zag order, so that
//     low frequencies come first and high-frequency zeros gather at the end;
//   - DPCM of the DC coefficient: the block's DC value is replaced by its
//     difference to the DC value of the previous block (the predictor is 0 at
//     start, so the first block keeps its DC value);
//   - run-length coding of the 63 AC coefficients as (run, value) pairs, run
//     being the number of zeros before a nonzero value. A run longer than 15
//     is broken up by (15, 0) words (16 zeros each), and trailing zeros are
//     replaced by a single end-of-block word (0, 0).
//
// Operation: on a start pulse the element walks through num_blocks blocks of
// 64 consecutive BRAM words (raster order, signed values in bits [15:0]). It
// reads a block into a local buffer (64 + 1 cycles), scans it (one cycle per
// coefficient plus one per (15, 0) word) and writes its output words back over
// the start of the block:
//   word 0      DC difference, sign-extended
//   word 1..n   {12'b0, run[3:0], value[15:0]}
// Words after the last output word keep their old contents; the next stage
// finds the end from the end-of-block word or from the coefficient count.
// done rises after the last block and stays high until the next start or
// pe_reset.
//
// Interface: the uniform PE interface (start / done / reset plus one BRAM
// port). Zig-zag scan, DPCM and (skip, value) coding follow the design
// description; the word layout, the (15, 0) words and the predictor reset
// at start are choices of this implementation (the last two as in baseline
// JPEG).
module rle_pe
  import prbram_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pe_reset,
  input  logic              start,
  input  logic [15:0]       num_blocks,
  output logic              done,
  output logic              busy,
  output mem_req_t          mem_req,
  input  logic [31:0]       mem_rdata
);

  typedef logic [5:0] zz_tab_t [64];

  function automatic zz_tab_t build_zz();
    zz_tab_t t;
    for (int p = 0; p < 64; p++) t[p] = 6'(zigzag(p));
    return t;
  endfunction

  localparam zz_tab_t ZZ = build_zz();

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SCAN, S_STORE} state_e;

  state_e              state;
  logic [15:0]         blk;
  logic [6:0]          idx;         // load/store counter, scan position
  logic                rd_pending;
  logic [5:0]          rd_slot;
  logic [5:0]          run;         // zeros seen since the last output
  logic [6:0]          nout;        // output words of this block
  logic signed [15:0]  prev_dc;

  logic signed [15:0]  coef [64];
  logic [31:0]         obuf [64];

  logic [MEM_AW-1:0]   blk_base;
  assign blk_base = MEM_AW'({blk, 6'd0});

  logic signed [15:0]  cur;
  assign cur = coef[ZZ[idx[5:0]]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      blk        <= '0;
      idx        <= '0;
      rd_pending <= 1'b0;
      rd_slot    <= '0;
      run        <= '0;
      nout       <= '0;
      prev_dc    <= '0;
    end else if (pe_reset) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      rd_pending <= 1'b0;
    end else begin
      rd_pending <= 1'b0;
      if (rd_pending) coef[rd_slot] <= mem_rdata[15:0];

      unique case (state)
        S_IDLE: begin
          if (start) begin
            done    <= 1'b0;
            blk     <= '0;
            idx     <= '0;
            prev_dc <= '0;
            if (num_blocks == 0) done  <= 1'b1;
            else                 state <= S_LOAD;
          end
        end
        S_LOAD: begin
          if (idx < 7'd64) begin
            rd_pending <= 1'b1;
            rd_slot    <= idx[5:0];
            idx        <= idx + 7'd1;
          end else if (!rd_pending) begin
            // DPCM of the DC coefficient
            obuf[0] <= 32'(coef[0] - prev_dc);
            prev_dc <= coef[0];
            nout    <= 7'd1;
            run     <= '0;
            idx     <= 7'd1;
            state   <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (idx == 7'd64) begin
            if (run != 0) begin
              obuf[nout[5:0]] <= 32'd0;            // end of block
              nout            <= nout + 7'd1;
            end
            idx   <= '0;
            state <= S_STORE;
          end else if (cur == 0) begin
            run <= run + 6'd1;
            idx <= idx + 7'd1;
          end else if (run > 6'd15) begin
            obuf[nout[5:0]] <= {12'd0, 4'd15, 16'd0};   // 16 zeros
            nout            <= nout + 7'd1;
            run             <= run - 6'd16;
          end else begin
            obuf[nout[5:0]] <= {12'd0, run[3:0], cur};
            nout            <= nout + 7'd1;
            run             <= '0;
            idx             <= idx + 7'd1;
          end
        end
        S_STORE: begin
          idx <= idx + 7'd1;
          if (idx + 7'd1 == nout) begin
            idx <= '0;
            if (blk + 16'd1 == num_blocks) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              blk   <= blk + 16'd1;
              state <= S_LOAD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_req = '0;
    if (state == S_LOAD && idx < 7'd64) begin
      mem_req.en   = 1'b1;
      mem_req.addr = blk_base + MEM_AW'(idx[5:0]);
    end else if (state == S_STORE) begin
      mem_req.en    = 1'b1;
      mem_req.we    = 1'b1;
      mem_req.addr  = blk_base + MEM_AW'(idx[5:0]);
      mem_req.wdata = obuf[idx[5:0]];
    end
  end

  assign busy = (state != S_IDLE);

  // a block never produces more than 64 words (one per coefficient at most)
  a_nout_bound: assert property (@(posedge clk) nout <= 7'd64);

endmodule

// dct_pe: reconfigurable module 0 of the JPEG dataflow, the 8x8 two-dimensional
// discrete cosine transform
//
//   DCT(i,j) = 1/4 C(i) C(j) sum_x sum_y s(x,y) cos((2x+1)i pi/16) cos((2y+1)j pi/16)
//
// with C(0) = 1/sqrt(2), C(k) = 1 otherwise, and s = pixel - 128.
//
// Operation: on a start pulse the element walks through num_blocks blocks
// of 64 consecutive BRAM words (word x*8+y holds pixel(x,y) in bits [7:0]).
// For each block it reads the 64 words into a local buffer (LOAD, 66 cycles
// including the read latency and one turn-around cycle), computes the row
// transform and then the column transform with one multiply-accumulate per
// cycle (ROW, COL: 512 cycles each), and writes the 64 coefficients back over
// the pixels (STORE, 64 cycles), sign-extended to 32 bits. A block takes
// 66 + 512 + 512 + 64 = 1154 cycles; done rises after the last block and
// stays high until the next start or pe_reset.
//
// Fixed point: the factors 0.5*C(k)*cos(...) carry 13 fraction bits, the
// row results keep 3 fraction bits, and the coefficients are rounded to the
// nearest integer (halves upward).
//
// Interface: the uniform PE interface shared by every reconfigurable module
// (start / done / reset control plus one BRAM port with one-cycle read
// latency). The equation, the start/done/reset control and the place of the
// element in the dataflow follow the design description; the level shift,
// the block layout in BRAM, the fixed-point format and the serial schedule
// are choices of this implementation.
module dct_pe
  import prbram_pkg::*;
#(
  parameter int unsigned COEF_FRAC = 13   // fraction bits of the cosine factors (fixed by the table)
) (
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

  localparam int unsigned ROW_SH = COEF_FRAC - 3;   // keep 3 fraction bits after rows
  localparam int unsigned COL_SH = COEF_FRAC + 3;   // back to integers after columns

  typedef logic signed [15:0] coef_tab_t [64];

  function automatic coef_tab_t build_k();
    coef_tab_t t;
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++)
        t[k*8+n] = 16'(dct_coef(k, n));
    return t;
  endfunction

  localparam coef_tab_t KTAB = build_k();

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_ROW, S_COL, S_STORE} state_e;

  state_e             state;
  logic [15:0]        blk;          // current block
  logic [6:0]         idx;          // load/store word counter
  logic               rd_pending;   // a read was issued last cycle
  logic [5:0]         rd_slot;      // buffer slot of that read
  logic [5:0]         oidx;         // output index of the MAC loop
  logic [2:0]         sidx;         // summation index of the MAC loop
  logic signed [31:0] acc;

  logic signed [8:0]  pix  [64];    // level-shifted pixels
  logic signed [15:0] tmp  [64];    // row results, 3 fraction bits
  logic signed [15:0] res  [64];    // coefficients

  logic [MEM_AW-1:0]  blk_base;
  assign blk_base = MEM_AW'({blk, 6'd0});

  // operands of the current multiply-accumulate step
  logic signed [15:0] k_op;
  logic signed [15:0] d_op;
  logic signed [31:0] prod;
  logic signed [31:0] sum;

  always_comb begin
    if (state == S_ROW) begin
      // t(i,y) = sum_x K(i,x) s(x,y),  oidx = i*8+y
      k_op = KTAB[{oidx[5:3], sidx}];
      d_op = 16'(pix[{sidx, oidx[2:0]}]);
    end else begin
      // D(i,j) = sum_y K(j,y) t(i,y),  oidx = i*8+j
      k_op = KTAB[{oidx[2:0], sidx}];
      d_op = tmp[{oidx[5:3], sidx}];
    end
    prod = k_op * d_op;
    sum  = acc + prod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      blk        <= '0;
      idx        <= '0;
      rd_pending <= 1'b0;
      rd_slot    <= '0;
      oidx       <= '0;
      sidx       <= '0;
      acc        <= '0;
    end else if (pe_reset) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      rd_pending <= 1'b0;
    end else begin
      rd_pending <= 1'b0;
      if (rd_pending)
        pix[rd_slot] <= 9'($signed({1'b0, mem_rdata[7:0]}) - 10'sd128);

      unique case (state)
        S_IDLE: begin
          if (start) begin
            done <= 1'b0;
            blk  <= '0;
            idx  <= '0;
            if (num_blocks == 0) done <= 1'b1;
            else                 state <= S_LOAD;
          end
        end
        S_LOAD: begin
          if (idx < 7'd64) begin
            rd_pending <= 1'b1;
            rd_slot    <= idx[5:0];
            idx        <= idx + 7'd1;
          end else if (!rd_pending) begin
            state <= S_ROW;
            oidx  <= '0;
            sidx  <= '0;
            acc   <= '0;
          end
        end
        S_ROW, S_COL: begin
          if (sidx == 3'd7) begin
            acc  <= '0;
            sidx <= '0;
            if (state == S_ROW)
              tmp[oidx] <= 16'((sum + (32'sd1 <<< (ROW_SH - 1))) >>> ROW_SH);
            else
              res[oidx] <= 16'((sum + (32'sd1 <<< (COL_SH - 1))) >>> COL_SH);
            oidx <= oidx + 6'd1;
            if (oidx == 6'd63) begin
              if (state == S_ROW) state <= S_COL;
              else begin
                state <= S_STORE;
                idx   <= '0;
              end
            end
          end else begin
            acc  <= sum;
            sidx <= sidx + 3'd1;
          end
        end
        S_STORE: begin
          idx <= idx + 7'd1;
          if (idx == 7'd63) begin
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
      mem_req.wdata = 32'(res[idx[5:0]]);
    end
  end

  assign busy = (state != S_IDLE);

endmodule

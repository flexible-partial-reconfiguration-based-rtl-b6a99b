// huffman_pe: reconfigurable module 3 of the JPEG dataflow, entropy coding.
//
// Input, per 8x8 block, is the layout left by rle_pe: word 0 holds the DC
// difference, the following words hold (run, value) AC symbols
// ({run[3:0], value[15:0]} in bits [19:0]); (0, 0) ends the block early and
// (15, 0) stands for 16 zeros. Each symbol becomes one variable-length code:
//   - DC: the Huffman code of its SIZE category (DC SIZE table, 2..9 bits),
//     then SIZE value bits;
//   - AC: the Huffman code of the Run/SIZE byte (standard luminance AC table,
//     2..16 bits), then SIZE value bits; end-of-block and (15, 0) carry no
//     value bits.
// Value bits are the value itself when positive and value-1 when negative,
// cut to SIZE bits (so -8 becomes 0111).
//
// Operation: on a start pulse the element walks through num_blocks blocks of
// 64 BRAM words. It reads a block into a local buffer (65 cycles), codes one
// symbol per cycle into a 64-bit packing register that hands over a 32-bit
// word as soon as 32 bits are pending, pads the last word with 1 bits, and
// writes back over the block:
//   word 0      number of code bits of the block
//   word 1..n   the code bits, first bit in bit 31 of word 1
// A block is finished when it has covered 63 AC positions or met (0, 0). At
// most 20 + 63*26 = 1658 bits arise, which fits the 63 words. done rises after
// the last block and stays high until the next start or pe_reset.
//
// Interface: the uniform PE interface (start / done / reset plus one BRAM
// port). The code tables and the value-bit rule follow the design
// description, with the AC rows it leaves out taken from the standard JPEG
// table; the word layout is a choice of this implementation, and byte
// stuffing and markers are left to the software that assembles the file.
module huffman_pe
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

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_CODE, S_PAD, S_STORE} state_e;

  state_e              state;
  logic [15:0]         blk;
  logic [6:0]          idx;          // load/store counter, symbol pointer
  logic                rd_pending;
  logic [5:0]          rd_slot;
  logic [6:0]          pos;          // AC positions covered so far
  logic [63:0]         pack;         // pending bits, left-aligned
  logic [6:0]          nbits;        // pending bit count (< 32 between symbols)
  logic [5:0]          wcnt;         // finished words of this block
  logic [15:0]         total;        // code bits of this block

  logic [19:0]         ibuf [64];
  logic [31:0]         obuf [64];

  logic [MEM_AW-1:0]   blk_base;
  assign blk_base = MEM_AW'({blk, 6'd0});

  // ------------------------------------------------ code of the current symbol
  logic signed [15:0]  val;
  logic [3:0]          run;
  logic [3:0]          sz;
  hcode_t              hc;
  logic [5:0]          len;          // code length plus value bits
  logic [25:0]         bits;         // right-aligned code and value bits
  logic                is_eob;
  logic [6:0]          pos_next;
  logic                last;         // this symbol ends the block

  always_comb begin
    run = (idx == 0) ? 4'd0 : ibuf[idx[5:0]][19:16];
    val = (idx == 0) ? $signed(ibuf[0][15:0]) : $signed(ibuf[idx[5:0]][15:0]);
    sz  = size_of(val);
    is_eob = (idx != 0) && (run == 0) && (val == 0);
    if (idx == 0) hc = dc_code(sz);
    else          hc = AC_TAB[{run, sz}];
    len  = 6'(hc.len) + 6'(sz);
    bits = (26'(hc.code) << sz) | 26'(value_bits(val, sz));
    if (idx == 0)    pos_next = pos;
    else if (is_eob) pos_next = 7'd63;
    else             pos_next = pos + 7'(run) + 7'd1;
    last = (idx != 0) && (pos_next >= 7'd63);
  end

  // packing register after adding the current symbol
  logic [63:0]  pack_add;
  logic [6:0]   nbits_add;
  always_comb begin
    pack_add  = pack | ((64'(bits) << (7'd64 - 7'(len))) >> nbits);
    nbits_add = nbits + 7'(len);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      blk        <= '0;
      idx        <= '0;
      rd_pending <= 1'b0;
      rd_slot    <= '0;
      pos        <= '0;
      pack       <= '0;
      nbits      <= '0;
      wcnt       <= '0;
      total      <= '0;
    end else if (pe_reset) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      rd_pending <= 1'b0;
    end else begin
      rd_pending <= 1'b0;
      if (rd_pending) ibuf[rd_slot] <= mem_rdata[19:0];

      unique case (state)
        S_IDLE: begin
          if (start) begin
            done <= 1'b0;
            blk  <= '0;
            idx  <= '0;
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
            idx   <= '0;
            pos   <= '0;
            pack  <= '0;
            nbits <= '0;
            wcnt  <= '0;
            total <= '0;
            state <= S_CODE;
          end
        end
        S_CODE: begin
          total <= total + 16'(len);
          pos   <= pos_next;
          idx   <= idx + 7'd1;
          if (nbits_add >= 7'd32) begin
            obuf[wcnt + 6'd1] <= pack_add[63:32];
            wcnt              <= wcnt + 6'd1;
            pack              <= pack_add << 32;
            nbits             <= nbits_add - 7'd32;
          end else begin
            pack  <= pack_add;
            nbits <= nbits_add;
          end
          if (last) state <= S_PAD;
        end
        S_PAD: begin
          obuf[0] <= 32'(total);
          if (nbits != 0) begin
            obuf[wcnt + 6'd1] <= pack[63:32] | (32'hFFFF_FFFF >> nbits);
            wcnt              <= wcnt + 6'd1;
          end
          idx   <= '0;
          state <= S_STORE;
        end
        S_STORE: begin
          idx <= idx + 7'd1;
          if (idx == 7'(wcnt)) begin
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

  // every Run/SIZE that occurs must have a code in the table
  a_code_exists: assert property (@(posedge clk) state == S_CODE |-> hc.len != 0);

endmodule

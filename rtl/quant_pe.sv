// quant_pe: reconfigurable module 1 of the JPEG dataflow, quantization
//
//   DCT_Q(i,j) = Round(DCT(i,j) / Q(i,j))
//
// Q is the standard JPEG luminance quantization matrix (ITU-T T.81 Annex
// K.1); the design description names the operation but does not print its
// matrix. Round is taken as half away from zero.
//
// Operation: on a start pulse the element walks through num_blocks blocks of
// 64 consecutive BRAM words holding signed DCT coefficients in raster order.
// It streams each block: word n is read, the next cycle it is divided and the
// quotient is written back to word n, so the port alternates read and write
// and a block takes 128 cycles. done rises after the last block and stays
// high until the next start or pe_reset.
//
// Interface: the uniform PE interface (start / done / reset plus one BRAM port
// with one-cycle read latency). The formula and the control signals follow the
// design description; the streaming schedule, the rounding rule and the
// matrix are choices of this implementation.
module quant_pe
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

  typedef logic [6:0] q_tab_t [64];

  function automatic q_tab_t build_q();
    q_tab_t t;
    for (int i = 0; i < 64; i++) t[i] = 7'(qtable(i));
    return t;
  endfunction

  localparam q_tab_t QTAB = build_q();

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} state_e;

  state_e       state;
  logic [15:0]  blk;
  logic [5:0]   idx;

  logic [MEM_AW-1:0] addr;
  assign addr = MEM_AW'({blk, idx});

  // rounding division of the word read in S_READ
  logic signed [31:0] coef;
  logic [31:0]        mag;
  logic [31:0]        q;
  logic [31:0]        quo;
  logic [31:0]        result;

  always_comb begin
    coef   = $signed(mem_rdata);
    mag    = coef[31] ? 32'(-coef) : 32'(coef);
    q      = 32'(QTAB[idx]);
    quo    = (mag + (q >> 1)) / q;
    result = coef[31] ? 32'(-quo) : quo;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      blk   <= '0;
      idx   <= '0;
    end else if (pe_reset) begin
      state <= S_IDLE;
      done  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            done <= 1'b0;
            blk  <= '0;
            idx  <= '0;
            if (num_blocks == 0) done  <= 1'b1;
            else                 state <= S_READ;
          end
        end
        S_READ:  state <= S_WRITE;
        S_WRITE: begin
          state <= S_READ;
          idx   <= idx + 6'd1;
          if (idx == 6'd63) begin
            if (blk + 16'd1 == num_blocks) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              blk <= blk + 16'd1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_req = '0;
    unique case (state)
      S_READ: begin
        mem_req.en   = 1'b1;
        mem_req.addr = addr;
      end
      S_WRITE: begin
        mem_req.en    = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.addr  = addr;
        mem_req.wdata = result;
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

endmodule

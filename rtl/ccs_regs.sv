// ccs_regs: memory-mapped programming interface of the Cache Compute System.
//
// The processor programs a command by writing these registers and then the start register;
// it polls the readiness register to learn that the unit is idle and the last command done.
// Register map (byte offsets from the CCS register base), as listed by the document:
//   0x00 command id  0x04 operand length  0x08 constant  0x0c op. A address  0x10 op. B address
//   0x14 result address  0x18 stride  0x1c execution (stride) mask, low word
//   0x20 execution mask, high word  0x24 reserved  0x28 start  0x2c readiness (read-only)
// Choices of this design: with 64 lanes the software mask has 64 bits and fills the two words at
// 0x1c and 0x20; the reserved word reads 0; writing 0x28 with bit 0 set starts the command
// (ignored while busy); readiness reads 1 when idle. All registers reset to 0, except the mask,
// which resets to all ones (every element taken).
// Bus: a request (req, we, addr = word index, wdata) is held until ack, which is a one-cycle
// pulse one clock after req rises; a write takes effect with that pulse, rdata is valid with it.
module ccs_regs
  import ccs_pkg::*;
#(
  parameter int unsigned N = LINE_WORDS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          we,
  input  logic [3:0]    addr,
  input  logic [W-1:0]  wdata,
  output logic          ack,
  output logic [W-1:0]  rdata,
  output cfg_t          cfg,
  output logic [N-1:0]  smask,
  output logic          start,
  input  logic          busy
);

  logic [63:0] mask_q;
  logic [W-1:0] start_q;

  if (N >= 64) begin : g_wide
    assign smask = N'(mask_q);
  end else begin : g_narrow
    assign smask = mask_q[N-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg     <= '0;
      mask_q  <= '1;
      start_q <= '0;
      start   <= 1'b0;
      ack     <= 1'b0;
      rdata   <= '0;
    end else begin
      start <= 1'b0;
      ack   <= req & ~ack;
      if (req && !ack) begin
        if (we) begin
          unique case (addr)
            R_CMD:    cfg.cmd    <= wdata[5:0];
            R_LEN:    cfg.len    <= wdata;
            R_CONST:  cfg.konst  <= wdata;
            R_AADDR:  cfg.a_addr <= wdata;
            R_BADDR:  cfg.b_addr <= wdata;
            R_RADDR:  cfg.r_addr <= wdata;
            R_STRIDE: cfg.stride <= wdata;
            R_MASKLO: mask_q[31:0]  <= wdata;
            R_MASKHI: mask_q[63:32] <= wdata;
            R_START: begin
              start_q <= wdata;
              start   <= wdata[0] & ~busy;
            end
            default: ;
          endcase
        end
        unique case (addr)
          R_CMD:    rdata <= W'(cfg.cmd);
          R_LEN:    rdata <= cfg.len;
          R_CONST:  rdata <= cfg.konst;
          R_AADDR:  rdata <= cfg.a_addr;
          R_BADDR:  rdata <= cfg.b_addr;
          R_RADDR:  rdata <= cfg.r_addr;
          R_STRIDE: rdata <= cfg.stride;
          R_MASKLO: rdata <= mask_q[31:0];
          R_MASKHI: rdata <= mask_q[63:32];
          R_START:  rdata <= start_q;
          R_READY:  rdata <= {{(W-1){1'b0}}, !busy};
          default:  rdata <= '0;
        endcase
      end
    end
  end

endmodule

// ccs_ctrl: control unit of the Cache Compute System: command sequencing and hardware loops.
//
// On start the controller decodes the command and walks the operands one partition (one cache
// line, N elements) at a time, so operands of any length run without software loops:
//   * VOP2: read the line of A into the input buffer, then the line of B, then issue to the CU;
//   * VOP1 and VCOP: read only A (the constant goes to every lane);
//   * COP (INITC): no read, go straight to issue.
// Map commands wait for the CU result of a partition and write it back (only the words the
// execution mask selects) before fetching the next partition: the line port is a single
// half-duplex channel, so reads of partition p+1 cannot overlap the write of partition p.
// Reduce commands fetch and issue every partition back to back while the CU pipeline reduces
// them, then wait for the accumulated result and write that one word to the result address.
// Operands and result must share the same word offset inside their lines; the offset of A
// (of the result, for COP) is used for all of them.
// Interface: cfg/smask from the registers, start (one-cycle pulse, ignored when the command id
// is invalid), busy (high from start to the end of the last write), done (one-cycle pulse).
// Line port to the cache: lp_req is held until the one-cycle lp_ack; lp_addr is a line number.
// CU port: see ccs_cu.
// The state sequence follows the document's command flow (idle, read, execute, write); the
// exact states, the input and result buffers and the port protocol are this design's choices.
module ccs_ctrl
  import ccs_pkg::*;
#(
  parameter int unsigned N = LINE_WORDS,
  localparam int unsigned LN = $clog2(N),
  localparam int unsigned LA = 32 - LN - 2       // line-address width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  cfg_t                cfg,
  input  logic [N-1:0]        smask,
  input  logic                start,
  output logic                busy,
  output logic                done,
  // line port to the cache
  output logic                lp_req,
  output logic                lp_we,
  output logic [LA-1:0]       lp_addr,
  output logic [N-1:0][W-1:0] lp_wdata,
  output logic [N-1:0]        lp_wmask,
  input  logic                lp_ack,
  input  logic [N-1:0][W-1:0] lp_rdata,
  // compute unit
  output logic                cu_valid,
  output logic                cu_first,
  output logic                cu_last,
  output logic [N-1:0][W-1:0] cu_a,
  output logic [N-1:0][W-1:0] cu_y,
  output logic [N-1:0]        cu_mask,
  output a_op_e               cu_a_op,
  output b_op_e               cu_b_op,
  output c_op_e               cu_c_op,
  input  logic                map_valid,
  input  logic [N-1:0][W-1:0] map_data,
  input  logic [N-1:0]        map_mask,
  input  logic                red_valid,
  input  logic [W-1:0]        red_data,
  input  logic                red_mask
);

  typedef enum logic [2:0] {
    S_IDLE, S_RD_A, S_RD_B, S_ISSUE, S_WAIT_MAP, S_WR_MAP, S_WAIT_RED, S_WR_RED
  } state_e;

  state_e              state;
  dec_t                dec;
  logic [W-1:0]        konst;
  logic [LA-1:0]       a_line, b_line, r_line;
  logic [LN-1:0]       offset, r_off;
  logic [31:0]         span, nparts, part;
  logic [N-1:0][W-1:0] buf_a, buf_b, res_buf;
  logic [N-1:0]        res_mask;
  logic [W-1:0]        red_word;
  logic [N-1:0]        emask, bmask;
  logic                last_part;

  // combinational values of the command being started
  dec_t                st_dec;
  logic [LN-1:0]       st_off;
  logic [31:0]         st_span;
  logic [32:0]         st_words;

  assign st_dec   = decode(cfg.cmd);
  assign st_off   = (st_dec.kind == K_COP) ? cfg.r_addr[LN+1:2] : cfg.a_addr[LN+1:2];
  assign st_span  = (cfg.len == '0) ? 32'd0 : ((cfg.len - 32'd1) * cfg.stride + 32'd1);
  assign st_words = 33'(st_off) + 33'(st_span) + 33'(N - 1);

  ccs_mask_gen #(.N(N)) u_mask (
    .part(part), .offset(offset), .span(span), .smask(smask), .bmask(bmask), .emask(emask)
  );

  assign last_part = (part == nparts - 32'd1);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      done     <= 1'b0;
      dec      <= '0;
      konst    <= '0;
      a_line   <= '0;
      b_line   <= '0;
      r_line   <= '0;
      offset   <= '0;
      r_off    <= '0;
      span     <= '0;
      nparts   <= '0;
      part     <= '0;
      res_mask <= '0;
      red_word <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start && st_dec.valid) begin
            dec    <= st_dec;
            konst  <= cfg.konst;
            a_line <= cfg.a_addr[31:LN+2];
            b_line <= cfg.b_addr[31:LN+2];
            r_line <= cfg.r_addr[31:LN+2];
            offset <= st_off;
            r_off  <= cfg.r_addr[LN+1:2];
            span   <= st_span;
            nparts <= 32'(st_words >> LN);
            part   <= '0;
            if (st_span == '0)                state <= S_IDLE;
            else if (st_dec.kind == K_COP)    state <= S_ISSUE;
            else                              state <= S_RD_A;
            done   <= (st_span == '0);
          end
        end
        S_RD_A: if (lp_ack) state <= (dec.kind == K_VOP2) ? S_RD_B : S_ISSUE;
        S_RD_B: if (lp_ack) state <= S_ISSUE;
        S_ISSUE: begin
          if (!dec.reduce) begin
            state <= S_WAIT_MAP;
          end else if (last_part) begin
            state <= S_WAIT_RED;
          end else begin
            part  <= part + 32'd1;
            state <= S_RD_A;
          end
        end
        S_WAIT_MAP: begin
          if (map_valid) begin
            res_mask <= map_mask;
            state    <= S_WR_MAP;
          end
        end
        S_WR_MAP: begin
          if (lp_ack) begin
            if (last_part) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              part  <= part + 32'd1;
              state <= (dec.kind == K_COP) ? S_ISSUE : S_RD_A;
            end
          end
        end
        S_WAIT_RED: begin
          if (red_valid) begin
            red_word <= red_mask ? red_data : '0;
            state    <= S_WR_RED;
          end
        end
        S_WR_RED: begin
          if (lp_ack) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // input buffer (operands A and B) and result buffer: data only, no reset needed
  always_ff @(posedge clk) begin
    if (state == S_RD_A && lp_ack)          buf_a   <= lp_rdata;
    if (state == S_RD_B && lp_ack)          buf_b   <= lp_rdata;
    if (state == S_WAIT_MAP && map_valid)   res_buf <= map_data;
  end

  // line port
  always_comb begin
    lp_req   = 1'b0;
    lp_we    = 1'b0;
    lp_addr  = a_line + LA'(part);
    lp_wdata = res_buf;
    lp_wmask = res_mask;
    unique case (state)
      S_RD_A:   lp_req = 1'b1;
      S_RD_B:   begin lp_req = 1'b1; lp_addr = b_line + LA'(part); end
      S_WR_MAP: begin lp_req = 1'b1; lp_we = 1'b1; lp_addr = r_line + LA'(part); end
      S_WR_RED: begin
        lp_req   = 1'b1;
        lp_we    = 1'b1;
        lp_addr  = r_line;
        lp_wdata = {N{red_word}};
        lp_wmask = N'(1) << r_off;
      end
      default: ;
    endcase
  end

  // compute unit
  assign cu_valid = (state == S_ISSUE);
  assign cu_first = (part == '0);
  assign cu_last  = last_part && dec.reduce;   // only a reduction reports a result word
  assign cu_a     = buf_a;
  assign cu_y     = (dec.kind == K_VOP2) ? buf_b : {N{konst}};
  assign cu_mask  = emask;
  assign cu_a_op  = dec.a_op;
  assign cu_b_op  = dec.b_op;
  assign cu_c_op  = dec.c_op;

endmodule

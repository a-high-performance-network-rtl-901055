// depacketizer_s: Depacketizer of the slave-side network interface.
//
// Turns request packets into AXI transactions for the slave (memory) core.
// The header flit and the address flit are latched; then the AXI command (AW
// for a write, AR for a read) is issued and, in parallel, the request header is
// pushed into the header FIFO (hf_*) so that the response can be addressed
// later. Both must be accepted before the next step. For a write, the data
// flits then pass straight through as W beats, WLAST on the tail flit.
// Command and FIFO push each follow valid/ready and are tracked separately,
// so either may be accepted first.
module depacketizer_s
  import ni_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  flit_t             in_flit,
  output logic              aw_valid,
  input  logic              aw_ready,
  output logic [TID_W-1:0]  aw_id,
  output logic [ADDR_W-1:0] aw_addr,
  output logic [LEN_W-1:0]  aw_len,
  output logic              w_valid,
  input  logic              w_ready,
  output logic [FLIT_W-1:0] w_data,
  output logic              w_last,
  output logic              ar_valid,
  input  logic              ar_ready,
  output logic [TID_W-1:0]  ar_id,
  output logic [ADDR_W-1:0] ar_addr,
  output logic [LEN_W-1:0]  ar_len,
  output logic              hf_valid,
  input  logic              hf_ready,
  output hdr_t              hf_hdr
);
  typedef enum logic [1:0] {D_HDR, D_ADDR, D_CMD, D_DATA} dstate_e;
  dstate_e           state;
  hdr_t              hdr_q;
  logic [ADDR_W-1:0] addr_q;
  logic              cmd_done, hf_done, cmd_fire, hf_fire, is_wr;

  hdr_t hdr_in;
  assign hdr_in = hdr_t'(in_flit.data);
  assign is_wr  = (hdr_q.typ == MT_WR_REQ);

  assign in_ready = (state == D_HDR) || (state == D_ADDR) || (state == D_DATA && w_ready);
  assign aw_valid = (state == D_CMD) && is_wr && !cmd_done;
  assign ar_valid = (state == D_CMD) && !is_wr && !cmd_done;
  assign hf_valid = (state == D_CMD) && !hf_done;
  assign aw_id    = hdr_q.tid;
  assign ar_id    = hdr_q.tid;
  assign aw_addr  = addr_q;
  assign ar_addr  = addr_q;
  assign aw_len   = hdr_q.len;
  assign ar_len   = hdr_q.len;
  assign hf_hdr   = hdr_q;
  assign w_valid  = (state == D_DATA) && in_valid;
  assign w_data   = in_flit.data;
  assign w_last   = in_flit.tail;

  assign cmd_fire = (aw_valid && aw_ready) || (ar_valid && ar_ready);
  assign hf_fire  = hf_valid && hf_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= D_HDR;
      hdr_q    <= '0;
      addr_q   <= '0;
      cmd_done <= 1'b0;
      hf_done  <= 1'b0;
    end else begin
      unique case (state)
        D_HDR: if (in_valid) begin
          hdr_q <= hdr_in;
          state <= D_ADDR;
        end
        D_ADDR: if (in_valid) begin
          addr_q <= in_flit.data;
          state  <= D_CMD;
        end
        D_CMD: begin
          if (cmd_fire) cmd_done <= 1'b1;
          if (hf_fire)  hf_done  <= 1'b1;
          if ((cmd_done || cmd_fire) && (hf_done || hf_fire)) begin
            cmd_done <= 1'b0;
            hf_done  <= 1'b0;
            state    <= is_wr ? D_DATA : D_HDR;
          end
        end
        D_DATA: if (in_valid && w_ready && in_flit.tail) state <= D_HDR;
        default: state <= D_HDR;
      endcase
    end
  end

  a_req_only: assert property (@(posedge clk) disable iff (!rst_n)
                               (state == D_HDR && in_valid) |-> (in_flit.head && !is_resp(hdr_in.typ)));
endmodule

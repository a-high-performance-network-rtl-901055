// depacketizer_m: Depacketizer of the master-side network interface.
//
// Restores response packets, coming from the packet queue or released from the
// reorder buffer, into AXI responses for the master core. A write-response
// packet (header only) becomes one B beat carrying its ID and response code.
// A read-response packet becomes R beats: its header is latched, then each
// payload flit is passed straight through as one R beat with the header's ID
// and response code, RLAST on the tail flit. The header is consumed in one
// cycle; B waits for BREADY, R beats follow RREADY.
module depacketizer_m
  import ni_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  flit_t             in_flit,
  output logic              b_valid,
  input  logic              b_ready,
  output logic [TID_W-1:0]  b_id,
  output logic [RESP_W-1:0] b_resp,
  output logic              r_valid,
  input  logic              r_ready,
  output logic [TID_W-1:0]  r_id,
  output logic [FLIT_W-1:0] r_data,
  output logic [RESP_W-1:0] r_resp,
  output logic              r_last
);
  hdr_t hdr_in, hdr_q;
  logic in_data_phase;   // header of a read response consumed, payload follows
  assign hdr_in = hdr_t'(in_flit.data);

  always_comb begin
    in_ready = 1'b0;
    b_valid  = 1'b0;
    r_valid  = 1'b0;
    if (!in_data_phase) begin
      if (in_valid && in_flit.head && hdr_in.typ == MT_WR_RESP) begin
        b_valid  = 1'b1;
        in_ready = b_ready;
      end else begin
        in_ready = 1'b1;          // read-response header, latched below
      end
    end else begin
      r_valid  = in_valid;
      in_ready = r_ready;
    end
  end

  assign b_id   = hdr_in.tid;
  assign b_resp = hdr_in.resp;
  assign r_id   = hdr_q.tid;
  assign r_resp = hdr_q.resp;
  assign r_data = in_flit.data;
  assign r_last = in_flit.tail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_data_phase <= 1'b0;
      hdr_q         <= '0;
    end else if (in_valid && in_ready) begin
      if (!in_data_phase) begin
        if (hdr_in.typ == MT_RD_RESP && !in_flit.tail) begin
          hdr_q         <= hdr_in;
          in_data_phase <= 1'b1;
        end
      end else if (in_flit.tail) begin
        in_data_phase <= 1'b0;
      end
    end
  end

  a_head_sync: assert property (@(posedge clk) disable iff (!rst_n)
                                (in_valid && !in_data_phase) |-> in_flit.head);
endmodule

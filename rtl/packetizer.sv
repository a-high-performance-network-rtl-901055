// packetizer: header builder and flit controller of a network interface.
//
// Takes one message descriptor at a time (desc_*): the assembled header, an
// optional address word and the number of data flits. The descriptor is held
// in the header registers while the flit controller sends, one flit per cycle
// on out_*: the header flit, the address flit (requests only), then n_data
// data flits taken from the data stream d_*. head marks the first flit, tail
// the last; a header-only packet has both. desc_ready is high only when the
// packetizer is idle, so a new message is accepted the cycle after the
// previous tail left. Used for requests on the master side and responses on
// the slave side. The packet layout is described in ni_pkg.
module packetizer
  import ni_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              desc_valid,
  output logic              desc_ready,
  input  hdr_t              desc_hdr,
  input  logic              desc_has_addr,
  input  logic [ADDR_W-1:0] desc_addr,
  input  logic [LEN_W:0]    desc_n_data,
  input  logic              d_valid,
  output logic              d_ready,
  input  logic [FLIT_W-1:0] d_data,
  output logic              out_valid,
  input  logic              out_ready,
  output flit_t             out_flit
);
  typedef enum logic [1:0] {P_IDLE, P_HDR, P_ADDR, P_DATA} pstate_e;
  pstate_e          state;
  hdr_t             hdr_q;
  logic             has_addr_q;
  logic [ADDR_W-1:0] addr_q;
  logic [LEN_W:0]   left_q;
  logic             fire;

  assign desc_ready = (state == P_IDLE);
  assign fire       = out_valid && out_ready;

  always_comb begin
    out_valid = 1'b0;
    out_flit  = '0;
    d_ready   = 1'b0;
    unique case (state)
      P_HDR: begin
        out_valid     = 1'b1;
        out_flit.head = 1'b1;
        out_flit.tail = !has_addr_q && (left_q == '0);
        out_flit.data = hdr_q;
      end
      P_ADDR: begin
        out_valid     = 1'b1;
        out_flit.tail = (left_q == '0);
        out_flit.data = addr_q;
      end
      P_DATA: begin
        out_valid     = d_valid;
        d_ready       = out_ready;
        out_flit.tail = (left_q == (LEN_W+1)'(1));
        out_flit.data = d_data;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= P_IDLE;
      hdr_q      <= '0;
      has_addr_q <= 1'b0;
      addr_q     <= '0;
      left_q     <= '0;
    end else begin
      unique case (state)
        P_IDLE: if (desc_valid) begin
          hdr_q      <= desc_hdr;
          has_addr_q <= desc_has_addr;
          addr_q     <= desc_addr;
          left_q     <= desc_n_data;
          state      <= P_HDR;
        end
        P_HDR: if (fire) state <= out_flit.tail ? P_IDLE : (has_addr_q ? P_ADDR : P_DATA);
        P_ADDR: if (fire) state <= out_flit.tail ? P_IDLE : P_DATA;
        P_DATA: if (fire) begin
          left_q <= left_q - 1'b1;
          if (out_flit.tail) state <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end
endmodule

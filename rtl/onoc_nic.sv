// Network interface between a functional core and its Cygnus router. It
// runs the circuit-switching protocol on the core's behalf and stands where
// the EO/OE interfaces are: opt_tx/opt_rx are the electrical sides of the
// modulator (EO) and the photodetector (OE).
//
// Sending one payload packet:
//   1. the core asks with req_valid/req_dst_*/req_len (length in 32-bit
//      words, at least 1);
//   2. a setup packet goes to the local ECU (control network, valid/ready);
//   3. the interface waits for the acknowledge that comes back along the
//      reserved path;
//   4. the payload is sent on the optical injection port, one 32-bit word per
//      clock cycle (32 Gbit/s at the 1 GHz control clock); tx_take tells the
//      core that tx_data was consumed in that cycle;
//   5. the tail packet is offered to the ECU in the same cycle as the last
//      word; if the ECU cannot take it then, it is offered until it does.
//      tx_done pulses when the tail has been accepted.
// Receiving: a setup addressed to this core reports the source on
// rx_setup_*; every cycle with light on the ejection port delivers a word on
// rx_valid/rx_data; the tail reports the number of words received on
// rx_tail_valid/rx_words. Control packets from the ECU are always accepted.
// Only the type and source fields of a received packet are read; the
// reserved bits of a sent packet are constant zero and ctrl_rx_ready is tied
// high, so these outputs are constant and the destination bits of received
// packets go unused on purpose.
//
// The protocol order (setup, ack, payload, tail with the last word) follows
// the design; the core-side handshake, the word width of the optical
// abstraction and the receive counters are this design's choices.
module onoc_nic
  import onoc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] node_x,
  input  logic [COORD_W-1:0] node_y,
  // core: send request
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [COORD_W-1:0] req_dst_x,
  input  logic [COORD_W-1:0] req_dst_y,
  input  logic [LEN_W-1:0]   req_len,
  input  logic [OPT_W-1:0]   tx_data,
  output logic               tx_take,
  output logic               tx_done,
  // core: receive
  output logic               rx_valid,
  output logic [OPT_W-1:0]   rx_data,
  output logic               rx_setup_valid,
  output logic [COORD_W-1:0] rx_src_x,
  output logic [COORD_W-1:0] rx_src_y,
  output logic               rx_tail_valid,
  output logic [LEN_W-1:0]   rx_words,
  // ECU local control port
  output logic               ctrl_tx_valid,
  output ctrl_pkt_t          ctrl_tx_pkt,
  input  logic               ctrl_tx_ready,
  input  logic               ctrl_rx_valid,
  input  ctrl_pkt_t          ctrl_rx_pkt,
  output logic               ctrl_rx_ready,
  input  logic               ack_in,
  // optical injection / ejection (electrical side of EO / OE)
  output opt_t               opt_tx,
  input  opt_t               opt_rx
);

  typedef enum logic [2:0] {
    S_IDLE, S_SETUP, S_WAIT_ACK, S_DATA, S_TAIL
  } state_e;

  state_e             state, state_nx;
  logic [COORD_W-1:0] dst_x, dst_y;
  logic [LEN_W-1:0]   remain;
  logic [LEN_W-1:0]   rx_cnt;

  function automatic ctrl_pkt_t make_pkt(input pkt_type_e t,
                                         input logic [COORD_W-1:0] sx, input logic [COORD_W-1:0] sy,
                                         input logic [COORD_W-1:0] dx, input logic [COORD_W-1:0] dy);
    ctrl_pkt_t p;
    p       = '0;
    p.ptype = t;
    p.src_x = sx;
    p.src_y = sy;
    p.dst_x = dx;
    p.dst_y = dy;
    return p;
  endfunction

  // ------------------------------------------------------------- transmit
  always_comb begin
    state_nx      = state;
    req_ready     = (state == S_IDLE);
    ctrl_tx_valid = 1'b0;
    ctrl_tx_pkt   = make_pkt(PKT_SETUP, node_x, node_y, dst_x, dst_y);
    tx_take       = 1'b0;
    tx_done       = 1'b0;
    opt_tx        = OPT_DARK;
    unique case (state)
      S_IDLE:     if (req_valid) state_nx = S_SETUP;
      S_SETUP: begin
        ctrl_tx_valid = 1'b1;
        if (ctrl_tx_ready) state_nx = S_WAIT_ACK;
      end
      S_WAIT_ACK: if (ack_in) state_nx = S_DATA;
      S_DATA: begin
        opt_tx.on   = 1'b1;
        opt_tx.bits = tx_data;
        tx_take     = 1'b1;
        if (remain == LEN_W'(1)) begin
          ctrl_tx_valid = 1'b1;
          ctrl_tx_pkt   = make_pkt(PKT_TAIL, node_x, node_y, dst_x, dst_y);
          if (ctrl_tx_ready) begin
            tx_done  = 1'b1;
            state_nx = S_IDLE;
          end else begin
            state_nx = S_TAIL;
          end
        end
      end
      S_TAIL: begin
        ctrl_tx_valid = 1'b1;
        ctrl_tx_pkt   = make_pkt(PKT_TAIL, node_x, node_y, dst_x, dst_y);
        if (ctrl_tx_ready) begin
          tx_done  = 1'b1;
          state_nx = S_IDLE;
        end
      end
      default: state_nx = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      dst_x  <= '0;
      dst_y  <= '0;
      remain <= '0;
    end else begin
      state <= state_nx;
      if (state == S_IDLE && req_valid) begin
        dst_x  <= req_dst_x;
        dst_y  <= req_dst_y;
        remain <= req_len;
      end
      if (state == S_DATA) remain <= remain - 1'b1;
    end
  end

  // -------------------------------------------------------------- receive
  assign ctrl_rx_ready  = 1'b1;
  assign rx_valid       = opt_rx.on;
  assign rx_data        = opt_rx.bits;
  assign rx_setup_valid = ctrl_rx_valid && ctrl_rx_pkt.ptype == PKT_SETUP;
  assign rx_tail_valid  = ctrl_rx_valid && ctrl_rx_pkt.ptype == PKT_TAIL;
  assign rx_src_x       = ctrl_rx_pkt.src_x;
  assign rx_src_y       = ctrl_rx_pkt.src_y;
  assign rx_words       = rx_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_cnt <= '0;
    end else if (rx_setup_valid) begin
      rx_cnt <= '0;
    end else if (opt_rx.on) begin
      rx_cnt <= rx_cnt + 1'b1;
    end
  end

  // ------------------------------------------------------------- checks
  assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && req_valid) |-> (req_len != '0))
    else $error("onoc_nic: zero-length payload request");
  assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && req_valid) |-> !(req_dst_x == node_x && req_dst_y == node_y))
    else $error("onoc_nic: request addressed to its own node");

endmodule

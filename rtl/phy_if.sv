// phy_if: the MAC's physical layer interface, TX, RX and CCA, towards the
// shared channel.
//
// TX takes requests from N_SRC sources (0 = ACK responder, 1 = beacon
// generator, 2 = send-and-wait). A request is held as pending until the
// transmitter is free; the lowest-numbered pending source goes first. The
// transmitter then drives ch_tx_active for the frame's air time with the
// frame on ch_tx_frm, and pulses tx_cfm for that source when the frame has
// ended. A clear from the source removes its pending request or cuts its frame
// short, with no confirm. RX is half duplex: while the transmitter is idle it
// passes every frame the channel delivers to dispatch (rx_valid, rx_frm), one
// cycle later. CCA registers the channel's busy indication. The document
// names these three blocks; how they work is this design's choice.
module phy_if
  import mac_pkg::*;
#(
  parameter int N_SRC = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // transmit requests
  input  logic [N_SRC-1:0]      tx_req,
  input  frame_t [N_SRC-1:0]    tx_frm,
  input  logic [N_SRC-1:0]      tx_clr,
  output logic [N_SRC-1:0]      tx_cfm,
  output logic                  tx_busy,
  // received frames
  output logic                  rx_valid,
  output frame_t                rx_frm,
  // clear channel assessment
  output logic                  cca_busy,
  // channel
  output logic                  ch_tx_active,
  output frame_t                ch_tx_frm,
  output logic                  ch_rx_en,
  input  logic                  ch_rx_valid,
  input  frame_t                ch_rx_frm,
  input  logic                  ch_busy
);
  logic [N_SRC-1:0]        pending;
  frame_t [N_SRC-1:0]      pend_frm;
  logic [$clog2(N_SRC+1)-1:0] owner;
  logic [LEN_W-1:0]        remaining;
  logic                    sel_valid;
  logic [$clog2(N_SRC+1)-1:0] sel;

  assign tx_busy  = ch_tx_active || (pending != '0);
  assign ch_rx_en = !ch_tx_active;

  always_comb begin
    sel_valid = 1'b0;
    sel       = '0;
    for (int i = N_SRC - 1; i >= 0; i--) begin
      if (pending[i]) begin
        sel_valid = 1'b1;
        sel       = ($clog2(N_SRC+1))'(i);
      end
    end
  end

  // TX
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending      <= '0;
      pend_frm     <= '0;
      owner        <= '0;
      remaining    <= '0;
      ch_tx_active <= 1'b0;
      ch_tx_frm    <= '0;
      tx_cfm       <= '0;
    end else begin
      tx_cfm <= '0;
      for (int i = 0; i < N_SRC; i++) begin
        if (tx_req[i]) begin
          pending[i]  <= 1'b1;
          pend_frm[i] <= tx_frm[i];
        end else if (tx_clr[i]) begin
          pending[i] <= 1'b0;
        end
      end
      if (ch_tx_active) begin
        if (tx_clr[owner]) begin
          ch_tx_active <= 1'b0;
        end else if (remaining == LEN_W'(1)) begin
          ch_tx_active  <= 1'b0;
          tx_cfm[owner] <= 1'b1;
        end else begin
          remaining <= remaining - 1'b1;
        end
      end else if (sel_valid) begin
        ch_tx_active  <= 1'b1;
        ch_tx_frm     <= pend_frm[sel];
        remaining     <= air_time(pend_frm[sel]);
        owner         <= sel;
        pending[sel]  <= tx_req[sel];
      end
    end
  end

  // RX and CCA
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_valid <= 1'b0;
      rx_frm   <= '0;
      cca_busy <= 1'b0;
    end else begin
      rx_valid <= ch_rx_valid && !ch_tx_active;
      if (ch_rx_valid) rx_frm <= ch_rx_frm;
      cca_busy <= ch_busy;
    end
  end

endmodule

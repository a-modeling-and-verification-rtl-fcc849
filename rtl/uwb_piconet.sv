// uwb_piconet: an IEEE 802.15.3 piconet of N_DEV MAC devices sharing one
// channel controller.
//
// Device 0 is the piconet coordinator and sends the beacon that sets the
// superframe for all. Every device has its own upper-layer ports (arrays
// indexed by device number, which is also the device ID); all their channel
// ports meet in the channel controller, which counts active transmitters and
// lets a frame through to a receiver only if nothing else that receiver hears
// transmitted during it. HEAR (who hears whom) and NOISE_PER_1024 (random
// frame loss) are handed to the channel; the defaults are an ideal channel on
// which every device hears every other. The
// default schedule gives CTA k of each superframe to device k. Each device
// gets a different backoff seed. The number of devices is this design's
// choice.
module uwb_piconet
  import mac_pkg::*;
#(
  parameter int N_DEV       = 4,
  parameter int FRAG_SIZE   = 256,
  parameter int DELAY_BOUND = 12000,
  parameter int BEACON_LEN  = 32,
  parameter int SF_LEN      = 3200,
  parameter int CAP_LEN     = 1024,
  parameter int CTA_LEN     = 512,
  parameter logic [N_CTA-1:0][ID_W-1:0] OWNERS = {4'd3, 4'd2, 4'd1, 4'd0},
  parameter logic [N_DEV-1:0][N_DEV-1:0] HEAR   = '1,
  parameter int unsigned NOISE_PER_1024         = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic   [N_DEV-1:0]     st_req,
  input  frame_t [N_DEV-1:0]     st_frm,
  output logic   [N_DEV-1:0]     st_full,
  input  logic   [N_DEV-1:0]     st_clr,
  output logic   [N_DEV-1:0]     st_cfm,
  output logic   [N_DEV-1:0]     st_ok,
  output logic   [N_DEV-1:0][7:0] st_seq,
  input  logic   [N_DEV-1:0]     cmd_req,
  input  frame_t [N_DEV-1:0]     cmd_frm,
  output logic   [N_DEV-1:0]     cmd_full,
  output logic   [N_DEV-1:0]     cmd_cfm,
  output logic   [N_DEV-1:0]     cmd_ok,
  output logic   [N_DEV-1:0]     rxs_valid,
  output frame_t [N_DEV-1:0]     rxs_frm,
  input  logic   [N_DEV-1:0]     rxs_pop,
  output logic   [N_DEV-1:0]     rxc_valid,
  output frame_t [N_DEV-1:0]     rxc_frm,
  input  logic   [N_DEV-1:0]     rxc_pop,
  output logic   [$clog2(N_DEV+1)-1:0] ch_load,
  output logic                   ch_collision,
  output logic                   ch_noise,
  output mac_evt_t [N_DEV-1:0]   evt,
  output logic   [N_DEV-1:0][5:0] cap_bw
);
  logic   [N_DEV-1:0] tx_active, rx_en, rx_valid;
  frame_t [N_DEV-1:0] tx_frm;
  frame_t             rx_frm;
  logic   [N_DEV-1:0] ch_busy;

  for (genvar i = 0; i < N_DEV; i++) begin : g_dev
    mac_device #(
      .MY_ID(ID_W'(i)), .IS_PNC(i == 0), .FRAG_SIZE(FRAG_SIZE), .DELAY_BOUND(DELAY_BOUND),
      .SEED(16'hACE1 ^ 16'(i * 16'h3D5B)), .BEACON_LEN(BEACON_LEN), .SF_LEN(SF_LEN),
      .CAP_LEN(CAP_LEN), .CTA_LEN(CTA_LEN), .OWNERS(OWNERS)
    ) u_dev (
      .clk, .rst_n,
      .st_req(st_req[i]), .st_frm(st_frm[i]), .st_full(st_full[i]), .st_clr(st_clr[i]),
      .st_cfm(st_cfm[i]), .st_ok(st_ok[i]), .st_seq(st_seq[i]),
      .cmd_req(cmd_req[i]), .cmd_frm(cmd_frm[i]), .cmd_full(cmd_full[i]),
      .cmd_cfm(cmd_cfm[i]), .cmd_ok(cmd_ok[i]),
      .rxs_valid(rxs_valid[i]), .rxs_frm(rxs_frm[i]), .rxs_pop(rxs_pop[i]),
      .rxc_valid(rxc_valid[i]), .rxc_frm(rxc_frm[i]), .rxc_pop(rxc_pop[i]),
      .ch_tx_active(tx_active[i]), .ch_tx_frm(tx_frm[i]), .ch_rx_en(rx_en[i]),
      .ch_rx_valid(rx_valid[i]), .ch_rx_frm(rx_frm), .ch_busy(ch_busy[i]),
      .evt(evt[i]), .cap_bw(cap_bw[i])
    );
  end

  channel_controller #(.N_DEV(N_DEV), .HEAR(HEAR), .NOISE_PER_1024(NOISE_PER_1024)) u_ch (
    .clk, .rst_n, .tx_active, .tx_frm, .rx_en, .busy(ch_busy), .rx_valid, .rx_frm,
    .load(ch_load), .collision_evt(ch_collision), .noise_evt(ch_noise)
  );

endmodule

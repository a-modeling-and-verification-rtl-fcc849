// superframe_control: keeps the superframe time line set by the last beacon
// and tells the timing controls when the CAP and this device's CTAs run.
//
// A setup pulse from the beacon decoder starts the superframe clock at t = 0.
// The CAP runs for cap_len cycles from t = 0 (cap_start pulse, cap_active,
// cap_remaining, then a cap_end pulse). The CTAP follows: N_CTA CTAs of
// cta_len cycles each, CTA k belonging to device owner[k]. During a CTA owned
// by MY_ID, cta_active is high and cta_remaining counts down, starting with a
// cta_start pulse. At t = sf_len the superframe is over and everything stays
// inactive until the next beacon. The beacon / CAP / CTAP order follows the
// document; the equal CTA length is this design's simplification.
module superframe_control
  import mac_pkg::*;
#(
  parameter logic [ID_W-1:0] MY_ID = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              setup,
  input  beacon_info_t      info_in,
  output logic              cap_start,
  output logic              cap_end,
  output logic              cap_active,
  output logic [TIME_W-1:0] cap_remaining,
  output logic              cta_start,
  output logic              cta_active,
  output logic [TIME_W-1:0] cta_remaining,
  output logic              in_sf
);
  localparam int KW = $clog2(N_CTA+1);

  beacon_info_t       info;
  logic [TIME_W-1:0]  t;        // time since the superframe started
  logic [TIME_W-1:0]  slot_t;   // time since the current CTA started
  logic [KW-1:0]      k;        // current CTA, N_CTA = CTAP over
  logic               in_ctap;
  logic               own_now;

  assign cap_active    = in_sf && (t < info.cap_len);
  assign cap_remaining = cap_active ? info.cap_len - t : '0;
  assign own_now       = in_ctap && (int'(k) < N_CTA) && (info.owner[k[KW-2:0]] == MY_ID);
  assign cta_active    = own_now;
  assign cta_remaining = own_now ? info.cta_len - slot_t : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      info      <= '0;
      t         <= '0;
      slot_t    <= '0;
      k         <= '0;
      in_sf     <= 1'b0;
      in_ctap   <= 1'b0;
      cap_start <= 1'b0;
      cap_end   <= 1'b0;
      cta_start <= 1'b0;
    end else begin
      cap_start <= 1'b0;
      cap_end   <= 1'b0;
      cta_start <= 1'b0;
      if (setup) begin
        info      <= info_in;
        t         <= '0;
        slot_t    <= '0;
        k         <= '0;
        in_sf     <= 1'b1;
        in_ctap   <= (info_in.cap_len == '0);
        cap_start <= (info_in.cap_len != '0);
        cta_start <= (info_in.cap_len == '0) && (info_in.owner[0] == MY_ID);
      end else if (in_sf) begin
        t <= t + 1'b1;
        if (t + 1'b1 >= info.sf_len) begin
          in_sf   <= 1'b0;
          in_ctap <= 1'b0;
        end
        if (!in_ctap && t + 1'b1 == info.cap_len) begin
          cap_end   <= 1'b1;
          in_ctap   <= 1'b1;
          slot_t    <= '0;
          k         <= '0;
          cta_start <= (info.owner[0] == MY_ID);
        end else if (in_ctap && int'(k) < N_CTA) begin
          if (slot_t + 1'b1 >= info.cta_len) begin
            slot_t    <= '0;
            k         <= k + 1'b1;
            cta_start <= (int'(k) + 1 < N_CTA) && (info.owner[k[KW-2:0] + 1'b1] == MY_ID);
          end else begin
            slot_t <= slot_t + 1'b1;
          end
        end
      end
    end
  end

endmodule

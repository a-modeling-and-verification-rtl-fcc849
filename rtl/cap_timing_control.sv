// cap_timing_control: CSMA/CA channel access in the contention access period.
//
// On a backoff request the block reads the frame's retry count, picks the
// backoff window BW from [7, 15, 31, 63] (7 on the first attempt, one step wider
// per retry, at most 63) and draws a backoff count in 0..BW from a 16-bit LFSR.
// The count is decremented once per SLOT cycles, but only while the medium is
// idle and only after the medium has been idle for BIFS cycles; any busy CCA
// indication suspends the countdown and restarts the BIFS wait. When the count
// reaches zero the frame is sent if its air time plus OVERHEAD fits in what is
// left of the CAP; otherwise, and whenever the CAP ends, everything is
// suspended until the next CAP start. The confirm from below is passed up.
// The window table and the countdown rules follow the document; BIFS, SLOT,
// OVERHEAD and the random source are this design's choices.
//
// Inputs from superframe control: cap_start/cap_end pulses, cap_active level,
// cap_remaining in cycles. cca_busy is the PHY's clear channel assessment.
module cap_timing_control
  import mac_pkg::*;
#(
  parameter int          BIFS     = 4,
  parameter int          SLOT     = 4,
  parameter int          OVERHEAD = 40,
  parameter logic [15:0] SEED     = 16'hACE1
) (
  input  logic              clk,
  input  logic              rst_n,
  mac_link_if.dst           up,
  mac_link_if.src           dn,
  input  logic              cap_start,
  input  logic              cap_end,
  input  logic              cap_active,
  input  logic [TIME_W-1:0] cap_remaining,
  input  logic              cca_busy,
  output logic              busy_suspend_evt,  // pulse: countdown suspended by a busy medium
  output logic              cap_suspend_evt,   // pulse: backoff suspended by the end of the CAP
  output logic [5:0]        bw                 // window used for the current frame
);
  typedef enum logic [1:0] {CP_IDLE, CP_WAIT_CAP, CP_BACKOFF, CP_WAIT_CFM} state_e;
  state_e state;

  frame_t             frm;
  logic [15:0]        lfsr;
  logic [5:0]         bo_cnt;
  logic [7:0]         idle_cnt;
  logic [7:0]         slot_cnt;
  logic               fits;

  assign fits = cap_active &&
                (cap_remaining >= TIME_W'(air_time(frm)) + TIME_W'(OVERHEAD));

  // Galois LFSR, x^16 + x^14 + x^13 + x^11 + 1, steps every cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= (SEED == '0) ? 16'h1 : SEED;
    else        lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= CP_IDLE;
      frm              <= '0;
      bo_cnt           <= '0;
      idle_cnt         <= '0;
      slot_cnt         <= '0;
      bw               <= 6'd7;
      up.cfm           <= 1'b0;
      up.ok            <= 1'b0;
      dn.req           <= 1'b0;
      dn.clr           <= 1'b0;
      dn.frm           <= '0;
      busy_suspend_evt <= 1'b0;
      cap_suspend_evt  <= 1'b0;
    end else begin
      up.cfm           <= 1'b0;
      dn.req           <= 1'b0;
      dn.clr           <= 1'b0;
      busy_suspend_evt <= 1'b0;
      cap_suspend_evt  <= 1'b0;
      if (up.clr) begin
        if (state == CP_WAIT_CFM) dn.clr <= 1'b1;
        state <= CP_IDLE;
      end else begin
        case (state)
          CP_IDLE: if (up.req) begin
            // read profile: window from the attempt number, random count in 0..BW
            frm      <= up.frm;
            bw       <= backoff_window(up.frm.retry);
            bo_cnt   <= lfsr[5:0] & backoff_window(up.frm.retry);
            idle_cnt <= '0;
            slot_cnt <= '0;
            state    <= cap_active ? CP_BACKOFF : CP_WAIT_CAP;
          end
          CP_WAIT_CAP: if (cap_start) begin
            idle_cnt <= '0;
            slot_cnt <= '0;
            state    <= CP_BACKOFF;
          end
          CP_BACKOFF: begin
            if (cap_end || !cap_active) begin
              cap_suspend_evt <= 1'b1;
              state           <= CP_WAIT_CAP;
            end else if (cca_busy) begin
              if (idle_cnt != '0 || slot_cnt != '0) busy_suspend_evt <= 1'b1;
              idle_cnt <= '0;
              slot_cnt <= '0;
            end else if (int'(idle_cnt) < BIFS) begin
              idle_cnt <= idle_cnt + 1'b1;
            end else if (bo_cnt == '0) begin
              if (fits) begin
                dn.req <= 1'b1;
                dn.frm <= frm;
                state  <= CP_WAIT_CFM;
              end else begin
                cap_suspend_evt <= 1'b1;
                state           <= CP_WAIT_CAP;
              end
            end else if (int'(slot_cnt) == SLOT - 1) begin
              slot_cnt <= '0;
              bo_cnt   <= bo_cnt - 1'b1;
            end else begin
              slot_cnt <= slot_cnt + 1'b1;
            end
          end
          CP_WAIT_CFM: if (dn.cfm) begin
            up.cfm <= 1'b1;
            up.ok  <= dn.ok;
            state  <= CP_IDLE;
          end
          default: state <= CP_IDLE;
        endcase
      end
    end
  end

endmodule

// channel_controller: the shared wireless medium that connects the devices of
// a piconet, with collision, hidden-node and noise effects.
//
// A channel loading counter (load) holds the number of devices whose
// transmitter is active. Which device hears which is set by the HEAR matrix:
// device j hears device i when HEAR[j][i] is 1 (the diagonal is ignored). By
// default every device hears every other one; clearing a pair of bits makes
// two devices hidden from each other. Each device's carrier sense, busy[j],
// is high while any transmitter it hears, or its own, is active, so a hidden
// device sees the channel idle and may start a transmission on top of
// another.
//
// Collisions are judged at each receiver. A frame from device i is marked
// corrupt at receiver j if, at any cycle of the frame, another device k that
// j hears was transmitting too, or j itself was (a half-duplex receiver
// misses what arrives while it transmits). When i's transmission ends, the frame is
// passed (rx_valid[j] pulse, frame on rx_frm) to every other device j that
// hears i, has its receiver active (rx_en) and did not see it corrupt. If any
// such listener saw it corrupt, collision_evt pulses. With the default
// matrix this is the plain rule "a frame is lost when the loading counter
// exceeds one during it".
//
// Noise: with probability NOISE_PER_1024/1024, drawn per frame from a 16-bit
// LFSR that runs every cycle, a frame that ended clean is lost at every
// receiver and noise_evt pulses. NOISE_PER_1024 = 0 turns noise off.
//
// The loading counter and delivery at the end of a clean frame follow the
// document's channel controller. It names channel noise and the hidden-node
// effect without describing them: the hearing matrix and the per-frame loss
// rate are this design's way of modelling them.
module channel_controller
  import mac_pkg::*;
#(
  parameter int                           N_DEV          = 4,
  parameter logic [N_DEV-1:0][N_DEV-1:0]  HEAR           = '1,
  parameter int unsigned                  NOISE_PER_1024 = 0,
  parameter logic [15:0]                  NOISE_SEED     = 16'h5EED
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic   [N_DEV-1:0]      tx_active,
  input  frame_t [N_DEV-1:0]      tx_frm,
  input  logic   [N_DEV-1:0]      rx_en,
  output logic   [N_DEV-1:0]      busy,          // per-device carrier sense
  output logic   [N_DEV-1:0]      rx_valid,
  output frame_t                  rx_frm,
  output logic   [$clog2(N_DEV+1)-1:0] load,
  output logic                    collision_evt, // pulse: a frame ended collided
  output logic                    noise_evt      // pulse: a clean frame was lost to noise
);
  localparam int CW = $clog2(N_DEV+1);

  logic [N_DEV-1:0]             active_q;
  logic [N_DEV-1:0][N_DEV-1:0]  corrupt;   // [i][j]: frame of i corrupt at j
  logic [N_DEV-1:0][N_DEV-1:0]  interf;    // [i][j]: j hears a transmitter other than i now
  logic [N_DEV-1:0]             ending;
  logic [N_DEV-1:0][N_DEV-1:0]  listen;    // [i][j]: j hears i (j != i)
  logic [15:0]                  lfsr;
  logic                         noise_hit;

  always_comb begin
    load = '0;
    for (int i = 0; i < N_DEV; i++) load = load + CW'(tx_active[i]);
  end

  always_comb begin
    for (int i = 0; i < N_DEV; i++) begin
      for (int j = 0; j < N_DEV; j++) begin
        listen[i][j] = (i != j) && HEAR[j][i];
        interf[i][j] = 1'b0;
        for (int k = 0; k < N_DEV; k++)
          if (k != i && (k == j || HEAR[j][k]) && tx_active[k]) interf[i][j] = 1'b1;
      end
    end
    for (int j = 0; j < N_DEV; j++) begin
      busy[j] = tx_active[j];
      for (int i = 0; i < N_DEV; i++)
        if (listen[i][j] && tx_active[i]) busy[j] = 1'b1;
    end
  end

  assign ending    = active_q & ~tx_active;
  assign noise_hit = (NOISE_PER_1024 != 0) && ({22'd0, lfsr[9:0]} < NOISE_PER_1024);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q      <= '0;
      corrupt       <= '0;
      rx_valid      <= '0;
      rx_frm        <= '0;
      collision_evt <= 1'b0;
      noise_evt     <= 1'b0;
      lfsr          <= NOISE_SEED;
    end else begin
      lfsr          <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
      active_q      <= tx_active;
      rx_valid      <= '0;
      collision_evt <= 1'b0;
      noise_evt     <= 1'b0;
      for (int i = 0; i < N_DEV; i++) begin
        if (tx_active[i] && !active_q[i]) corrupt[i] <= interf[i];
        else if (tx_active[i])            corrupt[i] <= corrupt[i] | interf[i];
        if (ending[i]) begin
          if (|(corrupt[i] & listen[i])) collision_evt <= 1'b1;
          if (noise_hit) begin
            noise_evt <= 1'b1;
          end else begin
            rx_frm <= tx_frm[i];
            for (int j = 0; j < N_DEV; j++)
              if (listen[i][j] && rx_en[j] && !corrupt[i][j]) rx_valid[j] <= 1'b1;
          end
        end
      end
    end
  end

endmodule

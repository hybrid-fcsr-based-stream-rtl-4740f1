// keyiv_ctrl: key/IV setup sequencer of the hybrid FCSR keystream generator.
//
// A start pulse performs the initial filling: load is raised for that clock
// and fill1..fill4 present the top N1..N4 bits of the 128-bit key, so that
// FCSR1 <- k127..k32, FCSR2 <- k127..k0, FCSR3 <- k127..k64 and
// FCSR4 <- k127..k0 at the cipher's sizes. Key initialization follows for
// 192 clocks (t = 0..191); at clock t the seed bits are bit t of
//   seed_a = {32 zeros, iv127..iv0, k31..k0}
//   seed_b = {64 zeros, iv127..iv0}
//   seed_c = {iv127..iv0, k63..k0}
//   seed_d = {64 zeros, iv127..iv0}
// which the datapath XORs with the keystream bit and injects into the FCSRs.
// No keystream is valid during these clocks. Afterwards the phase is RUN and
// ks_valid stays high: one keystream bit per clock until the next start.
//
// Timing: start seen at edge 0 loads the key; clocks 1..192 are the
// initialization steps; the first valid keystream bit is present after edge
// 193. key and iv must stay stable from start until initialization is over
// (this design reads the seed bits directly from them rather than keeping a
// copy). A start during INIT or RUN restarts the setup. Taking the filling
// from the top key bits for shorter registers is this design's
// generalisation of the cipher's fixed sizes.
module keyiv_ctrl #(
  parameter int unsigned N1 = 96,
  parameter int unsigned N2 = 128,
  parameter int unsigned N3 = 64,
  parameter int unsigned N4 = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [hfcsr_pkg::KEY_W-1:0] key,
  input  logic [hfcsr_pkg::IV_W-1:0]  iv,
  output logic              load,
  output logic              en,
  output logic [N1-1:0]     fill1,
  output logic [N2-1:0]     fill2,
  output logic [N3-1:0]     fill3,
  output logic [N4-1:0]     fill4,
  output logic              init,
  output logic              seed_a,
  output logic              seed_b,
  output logic              seed_c,
  output logic              seed_d,
  output logic              ks_valid,
  output hfcsr_pkg::phase_e phase
);

  import hfcsr_pkg::*;

  localparam int unsigned CNT_W = $clog2(INIT_CLOCKS);

  logic [CNT_W-1:0]       cnt;
  logic [INIT_CLOCKS-1:0] sa, sb, sc;

  always_comb begin
    sa = {32'b0, iv, key[31:0]};
    sb = {64'b0, iv};
    sc = {iv, key[63:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      cnt   <= '0;
    end else if (start) begin
      phase <= PH_INIT;
      cnt   <= '0;
    end else if (phase == PH_INIT) begin
      if (cnt == CNT_W'(INIT_CLOCKS - 1)) begin
        phase <= PH_RUN;
        cnt   <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb begin
    load     = start;
    en       = (phase != PH_IDLE);
    init     = (phase == PH_INIT);
    ks_valid = (phase == PH_RUN) && !start;
    fill1    = key[KEY_W-1 -: N1];
    fill2    = key[KEY_W-1 -: N2];
    fill3    = key[KEY_W-1 -: N3];
    fill4    = key[KEY_W-1 -: N4];
    seed_a   = init & sa[cnt];
    seed_b   = init & sb[cnt];
    seed_c   = init & sc[cnt];
    seed_d   = init & sb[cnt];
  end

  // The count never leaves 0..191.
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n)
                                cnt < CNT_W'(INIT_CLOCKS));

endmodule

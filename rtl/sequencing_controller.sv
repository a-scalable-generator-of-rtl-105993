// sequencing_controller: packet timing and channel/user synchronization.
//
// Time base: 'beacon' marks the first word of a packet; ADC words are
// counted from it. The packet starts with K time-interleaved Golay pilot
// slots of slot_len words from word slot_start on (user k in slot k).
//  - At every slot start the channel delay estimators are cleared and given
//    the seeds W of the user that owns the slot.
//  - Each channel's estimate in slot k is stored as beamformer weight w_mk,
//    and its delay (coarse position * QD + fine step) is accumulated.
//  - At the end of the last slot the weights are loaded into the beamformer
//    (w_load) and each channel's delay is averaged over the K users
//    (rounded). The channel that arrives last sets the reference; every other
//    channel gets an extra delay (latest - own), split into an integer part
//    for its coarse synchronizer and a fractional part for its fine
//    synchronizer. As in the document, these settings take effect with the
//    next packet (at the next beacon). A channel that missed a pilot keeps
//    its previous settings.
//  - The user delay estimators watch the beamformed streams in the same
//    slots, trailing by user_ofs words. A user's delay relative to user_ref
//    (the peak position of a user with no delay) sets its fine synchronizer,
//    its downsampling phase and its payload start, again for the next
//    packet. The payload window is counted in words of the downsampler input
//    (ds_valid) from pay_start (samples) for pay_len words.
// Words are counted on valid cycles only. All outputs are registered except
// the slot seeds, which follow the current slot.
module sequencing_controller
  import mimo_pkg::*;
#(
  parameter int unsigned M    = DEF_M,
  parameter int unsigned K    = DEF_K,
  parameter int unsigned P    = DEF_P,
  parameter int unsigned B    = DEF_B,
  parameter int unsigned OS   = DEF_OS,
  parameter int unsigned L    = DEF_L,
  parameter int unsigned QD   = DEF_QD,
  parameter int unsigned MAXD = 64,
  localparam int unsigned NS  = $clog2(L),
  localparam int unsigned QW  = $clog2(QD + 1) + 1,
  localparam int unsigned DW  = $clog2(MAXD + 1),
  localparam int unsigned PHW = (OS > 1) ? $clog2(OS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 beacon,
  input  logic                 ds_valid,
  // configuration
  input  logic [15:0]          slot_start,
  input  logic [15:0]          slot_len,
  input  logic [15:0]          user_ofs,
  input  logic [15:0]          user_ref,
  input  logic [31:0]          pay_start,
  input  logic [15:0]          pay_len,
  input  logic [NS-1:0]        w_seed [K],
  // channel estimators
  output logic                 ch_clear,
  output logic [NS-1:0]        ch_seed,
  input  logic [M-1:0]         ch_est_valid,
  input  logic signed [B-1:0]  ch_h_i [M],
  input  logic signed [B-1:0]  ch_h_q [M],
  input  logic [31:0]          ch_pos [M],
  input  logic signed [QW-1:0] ch_q   [M],
  // channel synchronizers and beamformer weights
  output logic [DW-1:0]        cs_delay [M],
  output logic signed [QW-1:0] fs_q     [M],
  output logic                 w_load,
  output logic signed [B-1:0]  w_i [M][K],
  output logic signed [B-1:0]  w_q [M][K],
  // user estimators
  output logic [K-1:0]         u_clear,
  input  logic [K-1:0]         u_est_valid,
  input  logic [31:0]          u_pos [K],
  input  logic signed [QW-1:0] u_q   [K],
  // user synchronizers and downsamplers
  output logic signed [QW-1:0] us_q     [K],
  output logic [PHW-1:0]       ds_phase [K],
  output logic [K-1:0]         ds_en,
  // status
  output logic [M-1:0]         ch_ok,
  output logic [K-1:0]         u_ok
);
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned AW = 40;

  logic [31:0] wc, cur;          // ADC word counter / index of current word
  logic [31:0] dwc;              // downsampler-input word counter
  logic [KW-1:0] slot;
  logic          in_slots;

  assign cur = beacon ? 32'd0 : wc;

  // slot boundaries of the current word
  logic          slot_edge, slots_end;
  logic [KW-1:0] edge_k;
  logic [K-1:0]  uedge;
  always_comb begin
    slot_edge = 1'b0;
    edge_k    = '0;
    uedge     = '0;
    for (int k = 0; k < K; k++) begin
      if (cur == 32'(slot_start) + 32'(k) * 32'(slot_len)) begin
        slot_edge = 1'b1;
        edge_k    = KW'(k);
      end
      if (cur == 32'(slot_start) + 32'(user_ofs) + 32'(k) * 32'(slot_len)) uedge[k] = 1'b1;
    end
    slots_end = (cur == 32'(slot_start) + 32'(K) * 32'(slot_len));
  end

  assign ch_seed = w_seed[slot];

  // channel delay accumulation
  logic signed [AW-1:0] acc  [M];
  logic [KW:0]          hits [M];
  logic signed [AW-1:0] avg  [M];
  logic [M-1:0]         avg_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wc <= '0; dwc <= '0; slot <= '0; in_slots <= 1'b0;
      ch_clear <= 1'b0; u_clear <= '0; w_load <= 1'b0;
      avg_ok <= '0;
      for (int m = 0; m < M; m++) begin
        acc[m] <= '0; hits[m] <= '0; avg[m] <= '0;
        for (int k = 0; k < K; k++) begin
          w_i[m][k] <= '0;
          w_q[m][k] <= '0;
        end
      end
    end else begin
      ch_clear <= beacon;
      u_clear  <= beacon ? '1 : '0;
      w_load   <= 1'b0;
      if (beacon) begin
        dwc <= ds_valid ? 32'd1 : 32'd0;
        in_slots <= 1'b0;
        for (int m = 0; m < M; m++) begin
          acc[m]  <= '0;
          hits[m] <= '0;
        end
      end else if (ds_valid) begin
        dwc <= dwc + 1;
      end
      if (in_valid) begin
        wc <= cur + 1;
        if (slot_edge) begin
          slot     <= edge_k;
          in_slots <= 1'b1;
          ch_clear <= 1'b1;
        end
        u_clear <= (beacon ? '1 : '0) | uedge;
        if (slots_end) begin
          in_slots <= 1'b0;
          w_load   <= 1'b1;
          for (int m = 0; m < M; m++) begin
            avg_ok[m] <= (hits[m] == (KW+1)'(K));
            avg[m]    <= AW'(div_round(longint'(acc[m]), longint'(K)));
          end
        end
      end
      if (in_slots && !beacon) begin
        for (int m = 0; m < M; m++) begin
          if (ch_est_valid[m]) begin
            w_i[m][slot] <= ch_h_i[m];
            w_q[m][slot] <= ch_h_q[m];
            acc[m]  <= acc[m] + AW'(ch_pos[m]) * AW'(QD) + AW'(ch_q[m]);
            hits[m] <= hits[m] + 1'b1;
          end
        end
      end
    end
  end

  // settings for the next packet, computed from the averages
  logic signed [AW-1:0] latest;
  logic [DW-1:0]        nxt_cs [M];
  logic signed [QW-1:0] nxt_fs [M];
  always_comb begin
    latest = '0;
    for (int m = 0; m < M; m++)
      if (avg_ok[m] && avg[m] > latest) latest = avg[m];
    for (int m = 0; m < M; m++) begin
      logic signed [AW-1:0] diff;
      diff      = latest - avg[m];
      nxt_cs[m] = DW'(sat(longint'(diff) / longint'(QD), int'(DW) + 1));
      nxt_fs[m] = -QW'(longint'(diff) % longint'(QD));
    end
  end

  // user delay capture
  logic [31:0]          upos [K];
  logic signed [QW-1:0] uqv  [K];
  logic [K-1:0]         u_got;
  logic [31:0]          sw   [K];   // payload start word per user
  logic [31:0]          ust  [K];   // payload start sample per user

  always_comb
    for (int k = 0; k < K; k++) ust[k] = pay_start + upos[k] - 32'(user_ref);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_got <= '0; u_ok <= '0; ch_ok <= '0;
      for (int m = 0; m < M; m++) begin
        cs_delay[m] <= '0;
        fs_q[m]     <= '0;
      end
      for (int k = 0; k < K; k++) begin
        upos[k] <= '0; uqv[k] <= '0; us_q[k] <= '0;
        ds_phase[k] <= '0; sw[k] <= '0;
      end
    end else begin
      for (int k = 0; k < K; k++) begin
        if (u_est_valid[k] && !u_got[k]) begin
          u_got[k] <= 1'b1;
          upos[k]  <= u_pos[k];
          uqv[k]   <= u_q[k];
        end
      end
      if (beacon) begin
        u_got <= '0;
        ch_ok <= avg_ok;
        u_ok  <= u_got;
        for (int m = 0; m < M; m++) begin
          if (avg_ok[m]) begin
            cs_delay[m] <= nxt_cs[m];
            fs_q[m]     <= nxt_fs[m];
          end
        end
        for (int k = 0; k < K; k++) begin
          if (u_got[k]) begin
            us_q[k]     <= uqv[k];
            ds_phase[k] <= PHW'(ust[k] % OS);
            sw[k]       <= ust[k] / P;
          end
        end
      end
    end
  end

  for (genvar k = 0; k < K; k++) begin : g_en
    assign ds_en[k] = (dwc >= sw[k]) && (dwc < sw[k] + 32'(pay_len));
  end
endmodule

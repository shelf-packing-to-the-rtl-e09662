// capture_fsm: sequences the time-gated test, one group of virtual cores at a time.
//
// On start (with enable) the FSM selects group 0 and runs n_patterns + 1 shift
// phases, with a capture window between consecutive ones: the first phase
// only loads, the last only unloads, the others unload the previous response
// while loading the next pattern. A shift phase lasts GRP_CYC[g] TAM cycles,
// the time the slowest core of the group needs plus the cycles its output
// converter needs to drain. In a capture window the group's scan_en is low
// (cap_win) and cap_go asks the cores' CPFs for their launch/capture pulses;
// the FSM leaves the window once all of them report cap_done. Then the next
// group follows, until the last one, after which done is raised until start
// falls. All state changes into a shift phase happen on a TAM strobe (ft_en),
// together with sync, so the tester sees every phase begin on a TAM cycle;
// shift_ph is high exactly during the GRP_CYC[g] TAM cycles of a phase. The
// group-serial order and the per-group shift/capture loop follow the document;
// phase lengths, the one-TAM-cycle settle before and after capture and the
// handshake with the CPFs are this design's choices.
module capture_fsm #(
  parameter int unsigned N_GROUPS = tgmf_pkg::N_GROUPS,
  parameter int unsigned PAT_W    = tgmf_pkg::PAT_W,
  parameter int unsigned CYC_W    = 16,
  parameter int unsigned GRP_CYC [N_GROUPS] = '{default: 8},
  localparam int unsigned GW = (N_GROUPS > 1) ? $clog2(N_GROUPS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             start,
  input  logic [PAT_W-1:0] n_patterns,
  input  logic             ft_en,
  input  logic             grp_cap_done,
  output logic [GW-1:0]    grp,
  output logic             grp_valid,
  output logic             sync,
  output logic             shift_ph,
  output logic             cap_win,
  output logic             cap_go,
  output logic             busy,
  output logic             done
);
  typedef enum logic [2:0] {S_IDLE, S_SHIFT, S_CAP_SETUP, S_CAPTURE, S_CAP_HOLD, S_DONE} state_e;
  state_e st;

  logic [CYC_W-1:0] cyc;
  logic [PAT_W-1:0] pat;
  logic             go_sent;

  logic [CYC_W-1:0] cyc_last;
  always_comb begin
    cyc_last = '0;
    for (int i = 0; i < N_GROUPS; i++)
      if (grp == GW'(i)) cyc_last = CYC_W'(GRP_CYC[i] - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      grp     <= '0;
      cyc     <= '0;
      pat     <= '0;
      go_sent <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: if (enable && start && ft_en) begin
          st  <= S_SHIFT;
          grp <= '0;
          pat <= '0;
          cyc <= '0;
        end
        S_SHIFT: if (ft_en) begin
          if (cyc == cyc_last) begin
            cyc <= '0;
            if (pat != n_patterns) st <= S_CAP_SETUP;
            else if (grp == GW'(N_GROUPS - 1)) st <= S_DONE;
            else begin
              // next group: its first phase starts on the next TAM strobe
              grp <= grp + 1'b1;
              pat <= '0;
              st  <= S_CAP_HOLD;
            end
          end else cyc <= cyc + 1'b1;
        end
        S_CAP_SETUP: if (ft_en) begin
          st      <= S_CAPTURE;
          go_sent <= 1'b0;
        end
        S_CAPTURE: begin
          go_sent <= 1'b1;
          if (go_sent && grp_cap_done) begin
            st  <= S_CAP_HOLD;
            pat <= pat + 1'b1;
          end
        end
        S_CAP_HOLD: if (ft_en) st <= S_SHIFT;
        S_DONE: if (!start) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign grp_valid = (st != S_IDLE) && (st != S_DONE);
  assign sync      = ft_en && ((st == S_IDLE && enable && start) || st == S_CAP_HOLD);
  assign shift_ph  = (st == S_SHIFT);
  assign cap_win   = (st == S_CAP_SETUP) || (st == S_CAPTURE);
  assign cap_go    = (st == S_CAPTURE) && !go_sent;
  assign busy      = grp_valid;
  assign done      = (st == S_DONE);

  // Capture pulses are only requested inside a capture window, and a shift
  // phase never overlaps one.
  assert property (@(posedge clk) disable iff (!rst_n) cap_go |-> cap_win);
  assert property (@(posedge clk) disable iff (!rst_n) !(shift_ph && cap_win));
endmodule

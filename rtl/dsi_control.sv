// dsi_control: the control scheme of one integrator module.
// It watches the synchronised front-panel lines, gated by CIN as in the
// original (F&CIN, END&CIN), and the decoded CAMAC commands, and orders
// the other units:
//   * rise of F&CIN : reset the address counter, instruction A+B
//                     ("reset int" in both modes, "reset det" as well)
//   * fall of F&CIN : in the detection mode only, reset the address counter,
//                     instruction A-B
//   * A0F9          : reset the address counter
//   * rise END&CIN  : one writing strobe with the current instruction
//   * A0F0          : instruction 0, then one writing strobe; the word it
//                     latches is put on the read lines (rd_en)
//   * A0F16 (test)  : one writing strobe with the current instruction
// The writing strobe has the original's three phases, one clock each:
// LATCH (output register takes the addressed word), WRITE (ALU result
// written back to the same cell), INC (address counter + 1). The buffer
// read is synchronous, and the sequencer spends at least one clock in IDLE
// between strobes, which is when the next address is read.
// Events arriving while a strobe runs are kept in one-deep pending flags
// and served from IDLE, address resets before strobes; this queueing, the
// clock-level timing and the read gate (set at an A0F0 latch, cleared by
// the next command to the module) are this design's own choices.
module dsi_control
  import dsi_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    fmod_s,
  input  logic    cin_s,
  input  logic    end_s,
  input  logic    det_mode,
  input  logic    cmd_rd,
  input  logic    cmd_rst,
  input  logic    cmd_wr,
  input  logic    cmd_any,
  output logic    addr_rst,
  output logic    addr_inc,
  output logic    ram_we,
  output logic    out_latch,
  output logic    ir_set,
  output alu_op_t ir_code,
  output logic    rd_en,
  output logic    busy
);
  typedef enum logic [1:0] {S_IDLE, S_LATCH, S_WRITE, S_INC} state_t;
  state_t state;

  logic gf, gf_d, ge, ge_d;
  logic ev_rise, ev_fall, ev_end;
  // pending requests
  logic p_rise, p_fall, p_rst, p_end, p_rd, p_wr;
  logic strobe_is_rd;
  logic serve_reset, serve_strobe;

  assign gf      = fmod_s & cin_s;
  assign ge      = end_s & cin_s;
  assign ev_rise = gf & ~gf_d;
  assign ev_fall = ~gf & gf_d & det_mode;
  assign ev_end  = ge & ~ge_d;

  // In IDLE: serve one address reset, or else one strobe.
  assign serve_reset  = (state == S_IDLE) && (p_rise || p_fall || p_rst);
  assign serve_strobe = (state == S_IDLE) && !serve_reset && (p_end || p_rd || p_wr);

  always_comb begin
    addr_rst  = serve_reset;
    ir_set    = 1'b0;
    ir_code   = OP_ADD;
    if (serve_reset) begin
      if (p_rise)      begin ir_set = 1'b1; ir_code = OP_ADD; end
      else if (p_fall) begin ir_set = 1'b1; ir_code = OP_SUB; end
    end else if (serve_strobe && !p_end && !p_wr && p_rd) begin
      ir_set  = 1'b1;
      ir_code = OP_ZERO;
    end
    out_latch = (state == S_LATCH);
    ram_we    = (state == S_WRITE);
    addr_inc  = (state == S_INC);
  end

  assign busy = (state != S_IDLE) || p_rise || p_fall || p_rst || p_end || p_rd || p_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gf_d <= 1'b0; ge_d <= 1'b0;
      state <= S_IDLE;
      p_rise <= 1'b0; p_fall <= 1'b0; p_rst <= 1'b0;
      p_end <= 1'b0; p_rd <= 1'b0; p_wr <= 1'b0;
      strobe_is_rd <= 1'b0;
      rd_en <= 1'b0;
    end else begin
      gf_d <= gf;
      ge_d <= ge;

      // address resets: a rise or a fall supersedes the other one still waiting
      if (serve_reset) begin
        if (p_rise)      p_rise <= 1'b0;
        else if (p_fall) p_fall <= 1'b0;
        else             p_rst  <= 1'b0;
      end
      if (ev_rise) begin p_rise <= 1'b1; p_fall <= 1'b0; end
      if (ev_fall) begin p_fall <= 1'b1; p_rise <= 1'b0; end
      if (cmd_rst) p_rst <= 1'b1;

      // strobes: END first, then test write, then readout
      if (serve_strobe) begin
        if (p_end)     p_end <= 1'b0;
        else if (p_wr) p_wr  <= 1'b0;
        else           p_rd  <= 1'b0;
        strobe_is_rd <= !p_end && !p_wr;
      end
      if (ev_end) p_end <= 1'b1;
      if (cmd_wr) p_wr  <= 1'b1;
      if (cmd_rd) p_rd  <= 1'b1;

      // read gate for the output logic
      if (cmd_any)                           rd_en <= 1'b0;
      else if (state == S_LATCH && strobe_is_rd) rd_en <= 1'b1;

      unique case (state)
        S_IDLE:  if (serve_strobe) state <= S_LATCH;
        S_LATCH: state <= S_WRITE;
        S_WRITE: state <= S_INC;
        default: state <= S_IDLE;
      endcase
    end
  end

  // CAMAC commands to a busy module would be lost if they repeat before the
  // pending flag is served.
  a_no_lost_rd: assert property (@(posedge clk) disable iff (!rst_n) cmd_rd |-> !p_rd)
    else $error("A0F0 while the previous one is still pending");
  a_no_lost_wr: assert property (@(posedge clk) disable iff (!rst_n) cmd_wr |-> !p_wr)
    else $error("test write while the previous one is still pending");
endmodule

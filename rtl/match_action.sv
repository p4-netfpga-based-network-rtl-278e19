// match_action - TCAM match/action stage that maps a 5G flow to a slice.
//
// The table holds ENTRIES ternary rules. A rule is a 6-tuple value, a mask
// of the same width (1 = bit must match, 0 = don't care) and an action: the
// priority queue the flow is sent to (0..31) and a drop flag. Control
// software inserts a rule by writing it with cfg_valid = 1 and deletes it by
// writing cfg_valid = 0 at the same index.
//
// A lookup compares the key against all rules at once. Only keys that the
// parser marked as 5G GTP traffic can match. When several rules match, the
// one with the lowest index wins; when none does, the default action
// (DEFAULT_QID, DEFAULT_DROP) is used. Both policies, the write port and the
// one-clock latency are this design's own choices. The action is returned
// already encoded for the 8-bit drop field of the packet metadata
// ({2'b0, queue, drop}), which is how the decision travels to the slicing core.
//
// Timing: dec_valid follows key_valid by one clock. A rule written in the
// same clock as a lookup takes effect from the next lookup on.
module match_action
  import slicing_pkg::*;
#(
  parameter int unsigned ENTRIES      = 32,
  parameter int unsigned DEFAULT_QID  = 0,
  parameter bit          DEFAULT_DROP = 1'b0,
  localparam int unsigned IDX_W       = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // lookup request
  input  logic          key_valid,
  input  slice_key_t    key,
  input  logic          is_5g,
  // rule write port
  input  logic          cfg_we,
  input  logic [IDX_W-1:0] cfg_addr,
  input  logic          cfg_valid,
  input  slice_key_t    cfg_value,
  input  slice_key_t    cfg_mask,
  input  slice_action_t cfg_action,
  // decision
  output logic          dec_valid,
  output logic [7:0]    dec_drop_field,
  output logic          dec_hit,
  output logic [IDX_W-1:0] dec_rule
);

  logic          rule_valid [ENTRIES];
  slice_key_t    rule_value [ENTRIES];
  slice_key_t    rule_mask  [ENTRIES];
  slice_action_t rule_act   [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        rule_valid[e] <= 1'b0;
        rule_value[e] <= '0;
        rule_mask[e]  <= '0;
        rule_act[e]   <= '0;
      end
    end else if (cfg_we && 32'(cfg_addr) < ENTRIES) begin
      rule_valid[cfg_addr] <= cfg_valid;
      rule_value[cfg_addr] <= cfg_value;
      rule_mask[cfg_addr]  <= cfg_mask;
      rule_act[cfg_addr]   <= cfg_action;
    end
  end

  // Parallel ternary compare and lowest-index priority encode.
  logic [ENTRIES-1:0] hit_vec;
  logic               any_hit;
  logic [IDX_W-1:0]   first_hit;

  always_comb begin
    for (int e = 0; e < ENTRIES; e++)
      hit_vec[e] = is_5g && rule_valid[e] && (((key ^ rule_value[e]) & rule_mask[e]) == '0);
    any_hit   = 1'b0;
    first_hit = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (hit_vec[e]) begin
        any_hit   = 1'b1;
        first_hit = IDX_W'(e);
      end
    end
  end

  slice_action_t act;
  always_comb begin
    if (any_hit) act = rule_act[first_hit];
    else begin
      act.qid  = qid_t'(DEFAULT_QID);
      act.drop = DEFAULT_DROP;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_valid      <= 1'b0;
      dec_drop_field <= '0;
      dec_hit        <= 1'b0;
      dec_rule       <= '0;
    end else begin
      dec_valid <= key_valid;
      if (key_valid) begin
        dec_drop_field <= encode_drop_field(act);
        dec_hit        <= any_hit;
        dec_rule       <= first_hit;
      end
    end
  end

endmodule

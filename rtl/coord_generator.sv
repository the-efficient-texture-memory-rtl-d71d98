// coord_generator: modified coordinate generator; emits the cache accesses of one bilinear
// request.
//
// A bilinear request needs texels (u,v), (u+1,v), (u,v+1), (u+1,v+1) (quad slots 0..3). Each
// emitted access names one explicit texel; the texels router later picks the other texels that
// the same access returns. What an access returns depends on the texture cache organisation
// (quasi-static input support):
//   SUP_2  (texture cache support 2, every footprint texel in the accessed line) uses the case
//          from the case identifier and emits only one texel per touched line:
//            case I slot 0; case II slots 0, 2; case III slots 0, 1; case IV slots 0..3.
//   SUP_1  (support 1, a burst returns a run of consecutive texels of one line, up to 16
//          bytes) emits a burst at the lowest-offset texel not yet covered, lines taken in slot
//          order. It marks covered the footprint texels of the run that starts there
//          (burst_mask in tex_pkg) and repeats until all four are covered: 1 to 4 accesses.
//   SUP_BASE (baseline, one texel per access) emits slots 0..3.
// One access record (access_t) leaves per cycle on a valid/ready port; the last one of a
// request is flagged. A new request is accepted in the cycle the previous one's last access
// leaves, so back-to-back single-access requests flow at one per cycle. The support-2 slot
// lists follow the described design; the burst grouping order, the access rate and the wrap
// of neighbour coordinates at the texture edge are this design's choices.
module coord_generator
  import tex_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  support_e support,      // texture cache organisation, change only when idle
  input  logic     req_valid,
  output logic     req_ready,
  input  tex_req_t req,
  input  case_e    req_cse,      // case of req, from the case identifier
  output logic     out_valid,
  input  logic     out_ready,
  output access_t  out_acc
);
  tex_req_t   cur;
  case_e      cur_cse;
  logic [1:0] step, slot;
  logic       busy, is_last;
  logic [3:0] covered, burst;    // support 1: texels already returned / returned by this burst
  logic [3:0][LINE_LOG2-1:0] qoff;

  quad_offsets u_qoff (
    .m(cur.m), .n(cur.n), .u(cur.u), .v(cur.v), .placement(cur.placement), .off(qoff));

  // support 1: pick the start texel, ordered by line (rank) then by offset in the line
  function automatic logic [1:0] line_rank(input case_e c, input logic [1:0] s);
    unique case (c)
      CASE_I:   line_rank = 2'd0;
      CASE_II:  line_rank = {1'b0, s[1]};
      CASE_III: line_rank = {1'b0, s[0]};
      default:  line_rank = s;
    endcase
  endfunction

  logic [1:0]             b_slot;
  logic [LINE_LOG2+1:0]   key, best;
  logic [3:0]             run;

  always_comb begin
    b_slot = 2'd0;
    best   = '1;
    for (int t = 0; t < 4; t++) begin
      key = {line_rank(cur_cse, 2'(t)), qoff[t]};
      if (!covered[t] && key < best) begin
        best   = key;
        b_slot = 2'(t);
      end
    end
    run   = burst_mask(cur_cse, b_slot, qoff);
    burst = run & ~covered;
  end

  always_comb begin
    unique case (support)
      SUP_BASE: begin slot = step; is_last = (step == 2'd3); end
      SUP_1:    begin slot = b_slot; is_last = &(covered | burst); end
      default: begin
        unique case (cur_cse)
          CASE_I:   begin slot = 2'd0;            is_last = 1'b1;          end
          CASE_II:  begin slot = {step[0], 1'b0}; is_last = (step == 2'd1); end
          CASE_III: begin slot = step;            is_last = (step == 2'd1); end
          default:  begin slot = step;            is_last = (step == 2'd3); end
        endcase
      end
    endcase
  end

  assign out_valid = busy;
  assign req_ready = !busy || (out_ready && is_last);

  always_comb begin
    out_acc           = '0;
    out_acc.u         = slot[0] ? ((cur.u + 1'b1) & low_mask(cur.m)) : cur.u;
    out_acc.v         = slot[1] ? ((cur.v + 1'b1) & low_mask(cur.n)) : cur.v;
    out_acc.slot      = slot;
    out_acc.cse       = cur_cse;
    out_acc.m         = cur.m;
    out_acc.n         = cur.n;
    out_acc.base      = cur.base;
    out_acc.placement = cur.placement;
    out_acc.fu        = cur.fu;
    out_acc.fv        = cur.fv;
    out_acc.last      = is_last;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      step    <= '0;
      covered <= '0;
      cur     <= '0;
      cur_cse <= CASE_I;
    end else if (req_valid && req_ready) begin
      busy    <= 1'b1;
      step    <= '0;
      covered <= '0;
      cur     <= req;
      cur_cse <= req_cse;
    end else if (out_valid && out_ready) begin
      if (is_last) busy <= 1'b0;
      else begin
        step    <= step + 1'b1;
        covered <= covered | burst;
      end
    end
  end
endmodule

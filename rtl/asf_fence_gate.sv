// asf_fence_gate: artificial dependency of ASF memory micro-ops on the ASF
// memory fences decoded from SPECULATE.
//
// Every asf.mfence that enters the reorder buffer increments a dispatch
// counter; every one that retires increments a retire counter. A memory
// micro-op written into an issue slot records the dispatch counter as its
// barrier. An ASF-spec memory micro-op may issue only once the retire counter
// has reached its barrier, i.e. once every fence older than it has retired;
// together with in-order retirement this gives
//   issue(asf.spec) -> retire(asf.mfence) -> issue(asf.memop) -> retire(asf.commit)
// and orders the memory accesses of back-to-back regions. Regular memory
// micro-ops are never held. A pipeline flush that annuls fences which had not
// retired lowers the dispatch counter by their number (fence_annul).
// Counter comparisons are modulo 2^CNT_W, so at most 2^(CNT_W-1)-1 fences may
// be in flight. A fence dispatched in the same cycle as a memory micro-op is
// taken as older than it. Using sequence counters for the dependency, the
// slot count and the counter width are this design's own choices.
//
// Timing: issue_ok is combinational from registered state.
module asf_fence_gate #(
  parameter int unsigned SLOTS = 8,
  parameter int unsigned CNT_W = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     fence_dispatch,
  input  logic                     fence_retire,
  input  logic [CNT_W-1:0]         fence_annul,
  input  logic                     mop_dispatch,
  input  logic [$clog2(SLOTS)-1:0] mop_slot,
  input  logic                     mop_is_asf,
  output logic [SLOTS-1:0]         issue_ok,
  output logic [CNT_W-1:0]         fences_in_flight
);

  logic [CNT_W-1:0] disp_cnt, ret_cnt;
  logic [CNT_W-1:0] barrier [SLOTS];
  logic [SLOTS-1:0] is_asf;

  wire [CNT_W-1:0] disp_now = disp_cnt + CNT_W'(fence_dispatch);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      disp_cnt <= '0;
      ret_cnt  <= '0;
      is_asf   <= '0;
      for (int i = 0; i < SLOTS; i++) barrier[i] <= '0;
    end else begin
      disp_cnt <= disp_now - fence_annul;
      ret_cnt  <= ret_cnt + CNT_W'(fence_retire);
      if (mop_dispatch) begin
        barrier[mop_slot] <= disp_now;
        is_asf[mop_slot]  <= mop_is_asf;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < SLOTS; i++) begin
      // pending > 0 means some older fence has not retired yet
      logic signed [CNT_W-1:0] pending;
      pending     = signed'(barrier[i] - ret_cnt);
      issue_ok[i] = !is_asf[i] || (pending <= 0);
    end
  end

  assign fences_in_flight = disp_cnt - ret_cnt;

endmodule

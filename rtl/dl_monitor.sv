// dl_monitor: deadlock (DL-type error) detection with cycle counters shared
// by sets of ROB entries.
//
// An upset in the issue queue (for instance a changed register tag) can leave
// an instruction that is never woken up; nothing compares anything and the
// machine simply stops. Each set of SET_SIZE consecutive ROB entries owns one
// counter. The counter is cleared when the first entry of its set is
// allocated and then counts every cycle while any entry of the set is still
// valid. When a counter reaches THRESH, dl_detect is raised (and stays up)
// and the set is reported in dl_set; the recovery logic then re-executes
// from the oldest instruction and pulses clear.
// The threshold and the set size are not given and are this design's
// choices.
module dl_monitor #(
  parameter int ROB_DEPTH = 64,
  parameter int SET_SIZE  = 4,
  parameter int THRESH    = 1024,
  localparam int NSETS    = ROB_DEPTH / SET_SIZE,
  localparam int IDX_W    = $clog2(ROB_DEPTH),
  localparam int CNT_W    = $clog2(THRESH + 1),
  localparam int SET_W    = (NSETS <= 2) ? 1 : $clog2(NSETS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 alloc_valid,
  input  logic [IDX_W-1:0]     alloc_idx,
  input  logic [ROB_DEPTH-1:0] entry_valid,
  output logic                 dl_detect,
  output logic [SET_W-1:0]     dl_set
);

  logic [CNT_W-1:0] cnt [NSETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dl_detect <= 1'b0;
      dl_set    <= '0;
      for (int s = 0; s < NSETS; s++) cnt[s] <= '0;
    end else if (clear) begin
      dl_detect <= 1'b0;
      for (int s = 0; s < NSETS; s++) cnt[s] <= '0;
    end else begin
      for (int s = 0; s < NSETS; s++) begin
        if (alloc_valid && int'(alloc_idx) == s * SET_SIZE) begin
          cnt[s] <= '0;
        end else if (|entry_valid[s*SET_SIZE +: SET_SIZE]) begin
          if (int'(cnt[s]) < THRESH) cnt[s] <= cnt[s] + 1'b1;
          if (int'(cnt[s]) == THRESH - 1 && !dl_detect) begin
            dl_detect <= 1'b1;
            dl_set    <= SET_W'(s);
          end
        end
      end
    end
  end

endmodule

// sort_engine: classifies one spike by the minimum feature distance.
//
// A one-cycle start begins a scan over the N_CLASSES templates, one class per
// cycle, through a single feature_distance unit: the engine drives tpl_idx,
// the configuration memory returns that class's template combinationally,
// and the running minimum and its class are kept. On the cycle after the last
// class, done pulses with cls (the winning class) and min_fd. Ties go to the
// lower class index. The features must stay constant while busy.
//
// Latency: done is high N_CLASSES + 1 cycles after start.
//
// From the document: FD computed for each template and the minimum taken.
// One class per cycle through one distance unit (Fig. 6 shows a single
// subtract/add unit) and the tie rule are this design's own.
module sort_engine
  import ct_sort_pkg::*;
#(
  parameter int N_CLASSES = 4,
  localparam int CIW = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [N_CNT-1:0][CNT_W-1:0] cnt,
  input  logic signed [ADC_W-1:0]     peak,
  output logic [CIW-1:0]              tpl_idx,
  input  template_t                   tpl,
  output logic                        busy,
  output logic                        done,
  output logic [CIW-1:0]              cls,
  output logic [FD_W-1:0]             min_fd
);

  logic [FD_W-1:0] fd;

  feature_distance u_fd (
    .cnt  (cnt),
    .peak (peak),
    .tpl  (tpl),
    .fd   (fd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tpl_idx <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      cls     <= '0;
      min_fd  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        tpl_idx <= '0;
        min_fd  <= '1;
        cls     <= '0;
      end else if (busy) begin
        if (tpl_idx == '0 || fd < min_fd) begin
          min_fd <= fd;
          cls    <= tpl_idx;
        end
        if (int'(tpl_idx) == N_CLASSES - 1) begin
          busy    <= 1'b0;
          done    <= 1'b1;
          tpl_idx <= '0;
        end else begin
          tpl_idx <= tpl_idx + 1'b1;
        end
      end
    end
  end

endmodule

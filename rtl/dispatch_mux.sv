// dispatch_mux: selects the next collector unit to send to the SIMD lanes.
//
// Among the collector units whose operands are complete (`cu_ready`), one is
// chosen round robin, starting after the last one dispatched. `disp_valid`
// is high while any unit is ready; when the execute stage accepts
// (`disp_ready`), `release_cu` frees the chosen unit in the same cycle and
// the pointer advances. `sel` is one-hot and steers the operand
// multiplexer. The design description only names this multiplexer; the
// round-robin choice is this design's own.
module dispatch_mux #(
  parameter int unsigned NUM_CU = hc_rf_pkg::RF_NUM_CU,
  localparam int unsigned CUW   = (NUM_CU > 1) ? $clog2(NUM_CU) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_CU-1:0] cu_ready,
  output logic [NUM_CU-1:0] sel,
  output logic [CUW-1:0]    sel_idx,
  output logic              disp_valid,
  input  logic              disp_ready,
  output logic [NUM_CU-1:0] release_cu
);

  logic [CUW-1:0] ptr_q;

  always_comb begin
    sel_idx    = '0;
    disp_valid = 1'b0;
    for (int unsigned k = 0; k < NUM_CU; k++) begin
      automatic int unsigned c = (32'(ptr_q) + k) % NUM_CU;
      if (!disp_valid && cu_ready[c]) begin
        sel_idx    = CUW'(c);
        disp_valid = 1'b1;
      end
    end
    sel = '0;
    if (disp_valid) sel[sel_idx] = 1'b1;
    release_cu = (disp_valid && disp_ready) ? sel : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr_q <= '0;
    else if (disp_valid && disp_ready) ptr_q <= CUW'((32'(sel_idx) + 1) % NUM_CU);
  end

endmodule

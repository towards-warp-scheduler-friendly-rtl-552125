// hc_cell: behavioural model (not synthesizable) of one hybrid cell.
//
// The real cell is a transistor-level circuit: a 4-transistor SRAM sub-cell
// and a complementary-polarizer MTJ (CP-MTJ) STT-RAM sub-cell, both on the
// bitline pair BL/BLN, with wordline WL0 for the SRAM sub-cell, WL1 for the
// STT-RAM sub-cell, and BUE coupling the two locally. This model keeps the
// logical behaviour and the timing of its operations:
//   S-Write    : WL0=1 with the write drivers on (BL=data, BLN=!data)
//   S-Read     : WL0=1 with the bitlines precharged (drivers off)
//   T-Write    : WL1=1 with the write drivers on
//   T-Read     : WL1=1 with the bitlines precharged
//   X-Transfer : BUE=1; the SRAM bit is copied into the MTJ without the
//                bitlines, so an S-Read may run at the same time
// A write or transfer takes effect only if its condition and data are held
// for the full write time; a shorter pulse leaves the sub-cell unchanged
// (the MTJ does not switch). A read presents the stored bit on `sense`
// after the read latency. The bitline pair is modelled by `bl_drive` and
// `bl`; BLN is always the complement of BL. The latencies are the
// per-operation figures given for the hybrid cell (SRAM write/read 0.77 ns,
// STT-RAM write 2.8 ns, read 0.71 ns); the X-Transfer time equal to the
// STT-RAM write time is this model's own assumption.
module hc_cell #(
  parameter real S_WRITE_NS = 0.77,
  parameter real S_READ_NS  = 0.77,
  parameter real T_WRITE_NS = 2.8,
  parameter real T_READ_NS  = 0.71,
  parameter real XFER_NS    = 2.8
) (
  input  logic bl_drive,  // write drivers on; otherwise precharged (read)
  input  logic bl,        // data on BL when driven
  input  logic wl0,
  input  logic wl1,
  input  logic bue,
  output logic sense,     // sensed bit
  output logic sram_bit,  // stored values, for observation
  output logic stt_bit
);

  logic s_wr, t_wr, s_rd, t_rd;
  int   s_gen, t_gen, x_gen, r_gen;

  assign s_wr = wl0 && bl_drive;
  assign t_wr = wl1 && bl_drive;
  assign s_rd = wl0 && !bl_drive;
  assign t_rd = wl1 && !bl_drive;

  initial begin
    s_gen = 0; t_gen = 0; x_gen = 0; r_gen = 0;
    sram_bit = 1'b0;
    stt_bit  = 1'b0;
    sense    = 1'b0;
  end

  always @(s_wr or bl) begin
    s_gen++;
    if (s_wr) fork
      begin
        automatic int   g = s_gen;
        automatic logic d = bl;
        #(S_WRITE_NS * 1ns);
        if (g == s_gen) sram_bit = d;
      end
    join_none
  end

  always @(t_wr or bl) begin
    t_gen++;
    if (t_wr) fork
      begin
        automatic int   g = t_gen;
        automatic logic d = bl;
        #(T_WRITE_NS * 1ns);
        if (g == t_gen) stt_bit = d;
      end
    join_none
  end

  always @(bue or sram_bit) begin
    x_gen++;
    if (bue) fork
      begin
        automatic int   g = x_gen;
        automatic logic d = sram_bit;
        #(XFER_NS * 1ns);
        if (g == x_gen) stt_bit = d;
      end
    join_none
  end

  always @(s_rd or t_rd) begin
    r_gen++;
    if (s_rd) fork
      begin
        automatic int g = r_gen;
        #(S_READ_NS * 1ns);
        if (g == r_gen) sense = sram_bit;
      end
    join_none
    else if (t_rd) fork
      begin
        automatic int g = r_gen;
        #(T_READ_NS * 1ns);
        if (g == r_gen) sense = stt_bit;
      end
    join_none
  end

endmodule

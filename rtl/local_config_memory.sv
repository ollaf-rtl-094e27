// local_config_memory: a column's local cache of configuration bitstreams (the
// configuration half of the LCM).
//
// A configuration is N_LE rows of CFG_PER_LE bits, row r holding the bits of
// LE r, and the memory keeps SLOTS of them. The HCM reads one row per clock
// (data one clock later) so a whole configuration reaches the configuration
// scan plane in N_LE clocks. The control bus delivers the same bitstream as
// 32-bit words: bitstream bit b is bit b%32 of word b/32, and row r is bits
// [r*CFG_PER_LE +: CFG_PER_LE]. A small gearbox packs the incoming words into
// rows: it accumulates words and writes a row whenever CFG_PER_LE bits are
// there, so one word per clock is accepted with no stall. Word 0 of a slot
// restarts the packing; words must then arrive in order.
//
// Interface: wr_* is the bus side (write only), rd_* the HCM side.
// The bitstream size per LE comes from the reference platform's 87 Kbit per
// 1024-LE column; the row organisation and the gearbox are this design's
// choices. Requires CFG_PER_LE >= 32 and N_LE*CFG_PER_LE divisible by 32.
module local_config_memory
  import ollaf_pkg::*;
#(
  parameter int unsigned N_LE       = ollaf_pkg::DEF_N_LE,
  parameter int unsigned CFG_PER_LE = ollaf_pkg::DEF_CFG_PER_LE,
  parameter int unsigned SLOTS      = ollaf_pkg::DEF_LCM_SLOTS,
  localparam int unsigned ROW_AW    = $clog2(N_LE),
  localparam int unsigned DEPTH     = SLOTS * N_LE,
  localparam int unsigned AW        = $clog2(DEPTH),
  localparam int unsigned ACC_W     = CFG_PER_LE + BUS_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // control-bus side
  input  logic                  wr_en,
  input  logic [3:0]            wr_slot,
  input  logic [11:0]           wr_word,   // word index inside the bitstream
  input  logic [BUS_W-1:0]      wr_data,
  output logic                  row_done,  // a row was written this clock
  // HCM side
  input  logic                  rd_en,
  input  logic [3:0]            rd_slot,
  input  logic [ROW_AW-1:0]     rd_row,
  output logic [CFG_PER_LE-1:0] rd_data
);

  logic [CFG_PER_LE-1:0] mem [DEPTH];

  logic [ACC_W-1:0]  acc, acc_base, acc_new;
  logic [7:0]        cnt, cnt_base, cnt_new;
  logic [ROW_AW-1:0] row, row_base;
  logic [3:0]        slot, slot_base;

  always_comb begin
    if (wr_word == '0) begin
      acc_base  = '0;
      cnt_base  = '0;
      row_base  = '0;
      slot_base = wr_slot;
    end else begin
      acc_base  = acc;
      cnt_base  = cnt;
      row_base  = row;
      slot_base = slot;
    end
    acc_new  = acc_base | (ACC_W'(wr_data) << cnt_base);
    cnt_new  = cnt_base + 8'(BUS_W);
  end

  assign row_done = wr_en && (cnt_new >= 8'(CFG_PER_LE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      cnt  <= '0;
      row  <= '0;
      slot <= '0;
    end else if (wr_en) begin
      slot <= slot_base;
      if (row_done) begin
        acc <= acc_new >> CFG_PER_LE;
        cnt <= cnt_new - 8'(CFG_PER_LE);
        row <= row_base + 1'b1;
      end else begin
        acc <= acc_new;
        cnt <= cnt_new;
        row <= row_base;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (row_done) mem[AW'(slot_base) * AW'(N_LE) + AW'(row_base)] <= acc_new[CFG_PER_LE-1:0];
    if (rd_en)    rd_data <= mem[AW'(rd_slot) * AW'(N_LE) + AW'(rd_row)];
  end

  initial begin
    assert (CFG_PER_LE >= BUS_W && CFG_PER_LE < 224);
    assert ((N_LE * CFG_PER_LE) % BUS_W == 0);
  end

endmodule

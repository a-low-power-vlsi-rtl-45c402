// seq_mem: sequentially accessed read/write memory.
//
// Signal processing code walks its coefficients and state variables in a
// fixed order, so the memory has no address input. Two seq_addr chains
// embedded along the rows select the row to read and the row to write; each
// access moves its chain on by one row, wrapping after the last. A delay
// line is kept by reading the oldest word of a row and writing the new one
// in its place, so data never move: the shift is virtual. The storage is an
// array of NWORDS words of W bits, and only the selected row is active.
//
// Separate read and write chains are this design's own choice: they let the
// writes lag the reads by one row when a filter walks its stages in the
// opposite order to the one in which it produces their inputs.
//
// Interface: rdata is the word in the selected read row (combinational);
// rd_adv moves the read chain on at the clock edge. wr_en writes wdata into
// the selected write row at the clock edge and moves the write chain on.
// restart returns both chains to row 0; rst_n also clears the array.
module seq_mem #(
  parameter int unsigned NWORDS = 8,
  parameter int unsigned W      = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         restart,
  input  logic         rd_adv,
  input  logic         wr_en,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] rdata
);

  logic [W-1:0]      mem [NWORDS];
  logic [NWORDS-1:0] rsel, wsel;
  logic              rlast, wlast;

  seq_addr #(.NWORDS(NWORDS)) u_rd (
    .clk, .rst_n, .restart, .adv(rd_adv), .sel(rsel), .last(rlast));
  seq_addr #(.NWORDS(NWORDS)) u_wr (
    .clk, .rst_n, .restart, .adv(wr_en), .sel(wsel), .last(wlast));

  // Read: the selected row drives the bit lines (one-hot, so an OR).
  always_comb begin
    rdata = '0;
    for (int i = 0; i < NWORDS; i++)
      if (rsel[i]) rdata |= mem[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NWORDS; i++) mem[i] <= '0;
    end else if (wr_en) begin
      for (int i = 0; i < NWORDS; i++)
        if (wsel[i]) mem[i] <= wdata;
    end
  end

  // The address chains must never select more than one row.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot(rsel) && $onehot(wsel));

endmodule

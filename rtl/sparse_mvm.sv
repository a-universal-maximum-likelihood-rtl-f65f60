// Sparse matrix-vector multiplier: H * e for an error vector e with at most
// MAX_HW ones, in one cycle.
//
// Over GF(2), H * e is the XOR of the columns of H that the ones of e select,
// so instead of a row-by-row AND/XOR pass (M = 44 cycles) the multiplier reads
// exactly those columns from SRAM and XORs them. Each bank of H sits in
// ceil(MAX_HW/2) dual-port SRAMs holding identical copies, one column per
// word: position k of e is read through port k%2 of SRAM k/2. So the primary
// block (MAX_HW = 2) needs one dual-port SRAM per bank and the secondary block
// (MAX_HW = 3) two, whose fourth port stays disabled during reads. Ports whose
// position is unused by a lighter error vector are also disabled.
//
// Two banks (two H matrices) are held; `rd_bank` picks the one a read uses.
// Column writes (up to two per cycle) go to every SRAM of the bank named on the
// write bus, port A taking the first column and port B the second. A write
// must not target the bank being read in the same cycle (assertion); the bank
// controller keeps a bank idle before it is rewritten.
//
// Timing: SRAM reads are synchronous, so `product`/`out_valid` follow
// `rd_en`/`err` by one cycle.
// Column selection, the SRAM counts and the disabled port follow the published
// architecture; the two-column write bus and the masking are this design's.
module sparse_mvm
  import grand_pkg::*;
#(
  parameter int unsigned MAX_HW = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  h_write_t    h_wr,
  input  logic        rd_en,
  input  logic        rd_bank,
  input  sparse_err_t err,
  output logic        out_valid,
  output syn_t        product
);

  localparam int unsigned NSRAM = (MAX_HW + 1) / 2;

  syn_t             rdata   [NBANKS][NSRAM][2];
  logic [MAX_HW-1:0] pos_en, pos_en_q;
  logic             bank_q;

  // a position takes part in the product if it is below the error's weight
  always_comb
    for (int k = 0; k < MAX_HW; k++)
      pos_en[k] = rd_en && (k < int'(err.hw));

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    for (genvar s = 0; s < NSRAM; s++) begin : g_sram
      logic               en_a, en_b, we_a, we_b;
      logic [COL_W-1:0]   addr_a, addr_b;
      logic               wr_here, rd_here;
      assign wr_here = (h_wr.bank == 1'(b));
      assign rd_here = (rd_bank == 1'(b));
      // port A: position 2s
      assign we_a   = wr_here && h_wr.en[0];
      assign en_a   = we_a || (rd_here && pos_en[2*s]);
      assign addr_a = we_a ? h_wr.addr[0] : err.pos[2*s];
      // port B: position 2s+1, write-only in the last SRAM of an odd MAX_HW
      assign we_b   = wr_here && h_wr.en[1];
      if (2*s + 1 < MAX_HW) begin : g_rd_b
        assign en_b   = we_b || (rd_here && pos_en[2*s+1]);
        assign addr_b = we_b ? h_wr.addr[1] : err.pos[2*s+1];
      end else begin : g_wr_b
        assign en_b   = we_b;
        assign addr_b = h_wr.addr[1];
      end
      dp_sram #(.WIDTH(M), .DEPTH(N)) u_sram (
        .clk,
        .en_a, .we_a, .addr_a, .wdata_a(h_wr.data[0]), .rdata_a(rdata[b][s][0]),
        .en_b, .we_b, .addr_b, .wdata_b(h_wr.data[1]), .rdata_b(rdata[b][s][1])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pos_en_q  <= '0;
      bank_q    <= 1'b0;
    end else begin
      out_valid <= rd_en;
      pos_en_q  <= pos_en;
      bank_q    <= rd_bank;
    end
  end

  always_comb begin
    product = '0;
    for (int k = 0; k < MAX_HW; k++)
      if (pos_en_q[k]) product ^= rdata[bank_q][k/2][k%2];
  end

  a_no_read_during_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(rd_en && (|h_wr.en) && h_wr.bank == rd_bank));

endmodule

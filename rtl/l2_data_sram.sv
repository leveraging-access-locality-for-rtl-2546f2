// l2_data_sram: behavioural model of the L2 data SRAM macro with parametric cell
// defects. Not synthesizable as a defect model: the defects are a property of the
// physical array, which is why this part is a model and not RTL.
//
// The array holds SETS*WAYS blocks; a block word is NSUB subblocks of 72 bits
// ({8 SEC-DED check bits, 64 data bits}), subblock s at bits [72*s +: 72].
// Port: one block read or write per cycle, full-block writes, read data
// registered (valid the cycle after rd_i). Defective cells are stuck-at cells:
// whatever is written, such a cell keeps its stuck value. Test code places
// defects with set_stuck() and models soft errors with flip(); clear_defects()
// removes all defects. The defect and soft-error behaviour follows the document's
// fault model (random parametric defects, transient soft errors); the stuck-at
// realisation and the port are this model's choice.
module l2_data_sram #(
  parameter int unsigned WORDS  = 16384,
  parameter int unsigned WORD_W = 576
) (
  input  logic                     clk,
  input  logic                     rd_i,
  input  logic                     wr_i,
  input  logic [$clog2(WORDS)-1:0] addr_i,
  input  logic [WORD_W-1:0]        wdata_i,
  output logic [WORD_W-1:0]        rdata_o
);
  logic [WORD_W-1:0] mem        [WORDS];
  logic [WORD_W-1:0] stuck_mask [WORDS];
  logic [WORD_W-1:0] stuck_val  [WORDS];

  initial begin
    for (int unsigned i = 0; i < WORDS; i++) begin
      mem[i]        = '0;
      stuck_mask[i] = '0;
      stuck_val[i]  = '0;
    end
  end

  always @(posedge clk) begin
    if (wr_i)
      mem[addr_i] <= (wdata_i & ~stuck_mask[addr_i]) | (stuck_val[addr_i] & stuck_mask[addr_i]);
    if (rd_i)
      rdata_o <= mem[addr_i];
  end

  task automatic set_stuck(input int unsigned word, input int unsigned bitpos, input logic val);
    stuck_mask[word][bitpos] = 1'b1;
    stuck_val[word][bitpos]  = val;
    mem[word][bitpos]        = val;
  endtask

  task automatic flip(input int unsigned word, input int unsigned bitpos);
    mem[word][bitpos] = ~mem[word][bitpos];
  endtask

  task automatic clear_defects();
    for (int unsigned i = 0; i < WORDS; i++) stuck_mask[i] = '0;
  endtask
endmodule

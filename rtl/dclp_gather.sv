// dclp_gather: groups the DC coefficients of the 16 blocks of a macroblock into
// the DC/LP block that the second FCT stage transforms.
//
// Stage 1 delivers one transformed 4x4 block per in_valid. Coefficient 0 of each
// (dc_in) is stored at the position equal to the block's index in the macroblock,
// the blocks being taken in raster order (index 0 = top-left block, whose value
// becomes the macroblock's DC; the other 15 become its LP values). A 4-bit counter
// gives that index; it starts at 0 after reset and wraps after 16 blocks, so the
// blocks of consecutive macroblocks must follow each other without a gap in the
// block sequence (gaps in time, i.e. clocks without in_valid, are allowed).
// blk_idx shows the index the current in_valid block is given.
// One clock after the 16th block, out_valid pulses for one clock with the complete
// block on blk. The block stays valid for that clock only: the first block of the
// next macroblock may overwrite position 0 at the same edge that stage 2 samples it.
// The placement follows the reference design's grouping figure; the counter,
// the timing and the storage are this design's choices.
module dclp_gather
  import fct_pkg::*;
#(
  parameter int unsigned CW = PIX_W + GROW     // coefficient width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [CW-1:0]  dc_in,
  output logic [3:0]            blk_idx,
  output logic                  out_valid,
  output logic signed [CW-1:0]  blk [NCOEF]
);

  logic [3:0] cnt;
  logic signed [CW-1:0] store [NBLK];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (cnt == 4'(NBLK - 1));
      if (in_valid) cnt <= cnt + 4'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) store[cnt] <= dc_in;
  end

  // a gathered block is announced for exactly one clock per 16 input blocks
  a_pulse: assert property (@(posedge clk) disable iff (!rst_n) out_valid |=> !out_valid)
    else $error("out_valid held for more than one clock");

  assign blk_idx = cnt;
  assign blk     = store;

endmodule

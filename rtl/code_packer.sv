// code_packer -- code generator and code packer: turns code items into
// bytes for the output buffer.
//
// An item is a head bit, a run of equal bits and up to 6 literals.  Each
// cycle the packer takes the next (up to) 8 bits of the item in that order,
// appends them to a bit accumulator holding 0..7 leftover bits, and when 8
// or more are present pushes the oldest 8 as a byte, first bit in the MSB.
// A long run takes several cycles; in_ready stays low until the item is
// used up.  COMMIT copies the accumulator into a shadow copy and commits
// the output buffer; ROLLBACK restores the accumulator and rolls the
// output buffer back.  END, after its own bits, pads the accumulator with
// zeros, pushes it if not empty, commits and pulses done.
//
// The source design builds codes of up to 14 bits and packs them into
// bytes in two stages; this design merges the two stages and lets the
// run be as long as the code buffer counts.  Interface: in_valid/in_ready;
// push/commit/rollback to out_buffer, stalled by push_ready.
module code_packer
  import ppmh_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  code_item_t in_item,
  output logic       push,
  output logic [7:0] push_data,
  input  logic       push_ready,
  output logic       commit,
  output logic       rollback,
  output logic       done
);

  code_item_t       it;
  logic             iv;
  logic [6:0]       acc, acc_s;
  logic [2:0]       accn, accn_s;

  // gather step
  code_item_t       it_d;
  logic [7:0]       nbits;
  logic [3:0]       nb;
  logic [14:0]      combo;
  logic [3:0]       total;
  logic             has_bits, stall, finish;
  logic [6:0]       acc_d;
  logic [2:0]       accn_d;

  always_comb begin
    logic b;
    b     = 1'b0;
    it_d  = it;
    nbits = '0;
    nb    = '0;
    for (int i = 0; i < 8; i++) begin
      if (it_d.head_v) begin
        b = it_d.head; it_d.head_v = 1'b0;
        nbits = {nbits[6:0], b}; nb = nb + 1'b1;
      end else if (it_d.run_len != '0) begin
        b = it_d.run_bit; it_d.run_len = it_d.run_len - 1'b1;
        nbits = {nbits[6:0], b}; nb = nb + 1'b1;
      end else if (it_d.lit_n != '0) begin
        b = it_d.lits[it_d.lit_n - 3'd1]; it_d.lit_n = it_d.lit_n - 3'd1;
        nbits = {nbits[6:0], b}; nb = nb + 1'b1;
      end
    end
    has_bits = iv && (it.head_v || it.run_len != '0 || it.lit_n != '0);
    total    = 4'(accn) + nb;
    combo    = (15'(acc) << nb) | 15'(nbits);
    push      = 1'b0;
    push_data = '0;
    acc_d     = acc;
    accn_d    = accn;
    commit    = 1'b0;
    rollback  = 1'b0;
    done      = 1'b0;
    finish    = 1'b0;
    stall     = 1'b0;
    if (has_bits) begin
      if (total >= 4'd8) begin
        push      = 1'b1;
        push_data = 8'(combo >> (total - 4'd8));
        stall     = !push_ready;
        acc_d     = 7'(combo & ((15'd1 << (total - 4'd8)) - 15'd1));
        accn_d    = 3'(total - 4'd8);
      end else begin
        acc_d  = 7'(combo);
        accn_d = 3'(total);
      end
      finish = !stall && !(it_d.head_v || it_d.run_len != '0 || it_d.lit_n != '0)
               && it.kind == EV_BIT;
    end else if (iv) begin
      unique case (it.kind)
        EV_COMMIT:   begin commit = 1'b1; finish = 1'b1; end
        EV_ROLLBACK: begin rollback = 1'b1; finish = 1'b1; end
        EV_END: begin
          if (accn != '0) begin
            push      = 1'b1;
            push_data = {acc, 1'b0} << (3'd7 - accn);
            stall     = !push_ready;
          end
          commit = !stall;
          done   = !stall;
          finish = !stall;
          acc_d  = '0;
          accn_d = '0;
        end
        default: finish = 1'b1;
      endcase
    end
  end

  assign in_ready = !iv || finish;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iv     <= 1'b0;
      it     <= '0;
      acc    <= '0;
      accn   <= '0;
      acc_s  <= '0;
      accn_s <= '0;
    end else begin
      if (!stall) begin
        if (has_bits) begin
          it   <= it_d;
          acc  <= acc_d;
          accn <= accn_d;
        end else if (iv) begin
          unique case (it.kind)
            EV_COMMIT: begin
              acc_s  <= acc;
              accn_s <= accn;
            end
            EV_ROLLBACK: begin
              acc  <= acc_s;
              accn <= accn_s;
            end
            EV_END: begin
              acc <= '0; accn <= '0; acc_s <= '0; accn_s <= '0;
            end
            default: ;
          endcase
        end
      end
      if (in_ready) begin
        iv <= in_valid;
        if (in_valid) it <= in_item;
      end else if (finish) begin
        iv <= 1'b0;
      end
    end
  end

endmodule

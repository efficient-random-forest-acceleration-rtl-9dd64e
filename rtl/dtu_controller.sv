// dtu_controller: address selection of the Decision Tree Unit.
//
// The DTU pipeline is five cycles deep and is shared by five tree subsets,
// one per pipeline slot, so one read is issued per cycle and each slot comes
// back to the controller exactly five cycles after it left. Each cycle the
// controller looks at the slot returning from the comparator (ret_*) and
// issues that slot's next read (iss_tag):
//   * after start, five cycles issue reads of the subset-address words 0..4;
//   * a returning subset-address word starts its subset at the address in
//     bits [31:1]; once a word with the final-subset flag (bit 0) has been
//     seen, the subsets after it are empty and are marked finished;
//   * a returning internal node continues at addr + 1 (left child, when
//     feature <= threshold) or at addr + right_rel (right child);
//   * a returning leaf continues at addr + next_rel (the next tree of the
//     subset) unless its isLast bit is set, which finishes the subset.
// The unit is finished when all five subsets are; done pulses for one cycle
// and busy falls in the next. start is ignored while busy.
// Timing: start at cycle 0, header reads at cycles 1..5, subset k's first
// node at cycle 6+k; a subset that visits V nodes is finished (its flag
// visible) at cycle 7+k+5V; done pulses in the cycle the last flag appears,
// so a run lasts max over k of (7+k+5*V_k) cycles.
// Slot interleaving, the subset-address words and the isLast rule follow
// the DTU architecture; the final-subset reading of bit 0 and the exact
// start-up cycle are this design's.
module dtu_controller
  import rf_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  // slot returning from the end of the pipeline
  input  slot_tag_t ret_tag,
  input  word_t     ret_word,
  input  logic      ret_le,
  // read issued into the pipeline this cycle
  output slot_tag_t iss_tag,
  output logic      busy,
  output logic      done
);

  logic                 running;
  logic [2:0]           hdr_cnt;
  logic [N_SUBSETS-1:0] slot_done;
  logic                 kill_rest;
  node_t                n;
  logic                 fin_slot;    // returning slot finishes this cycle

  assign n    = decode_node(ret_word);
  assign busy = running;
  assign done = running && (&slot_done);

  always_comb begin
    iss_tag  = '{kind: REQ_NONE, slot: ret_tag.slot, addr: '0};
    fin_slot = 1'b0;
    if (running && hdr_cnt < 3'(N_SUBSETS)) begin
      iss_tag = '{kind: REQ_HEADER, slot: hdr_cnt, addr: 32'(hdr_cnt)};
    end else if (running) begin
      unique case (ret_tag.kind)
        REQ_HEADER: begin
          if (kill_rest) fin_slot = 1'b1;
          else iss_tag = '{kind: REQ_NODE, slot: ret_tag.slot, addr: {1'b0, ret_word[31:1]}};
        end
        REQ_NODE: begin
          if (!n.is_leaf)
            iss_tag = '{kind: REQ_NODE, slot: ret_tag.slot,
                        addr: ret_le ? ret_tag.addr + 32'd1
                                     : ret_tag.addr + 32'(n.right_rel)};
          else if (!n.is_last)
            iss_tag = '{kind: REQ_NODE, slot: ret_tag.slot,
                        addr: ret_tag.addr + 32'(n.next_rel)};
          else
            fin_slot = 1'b1;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      hdr_cnt   <= '0;
      slot_done <= '0;
      kill_rest <= 1'b0;
    end else if (!running) begin
      if (start) begin
        running   <= 1'b1;
        hdr_cnt   <= '0;
        slot_done <= '0;
        kill_rest <= 1'b0;
      end
    end else if (done) begin
      running <= 1'b0;
    end else begin
      if (hdr_cnt < 3'(N_SUBSETS)) hdr_cnt <= hdr_cnt + 3'd1;
      if (ret_tag.kind == REQ_HEADER && ret_word[0]) kill_rest <= 1'b1;
      if (fin_slot) slot_done[ret_tag.slot] <= 1'b1;
    end
  end

endmodule

// frag_memory: the memory unit, partial results of fragmented packets.
//
// N_ENTRIES places, each holding the identification of one fragmented
// packet (frag_key_t: addresses, identification, protocol) and its state
// (frag_state_t: partial 1's complement sum, bytes received, total length).
// Everything is in registers so that all places are compared in parallel:
//   cycle 1  lookup=1 with the key: every valid place is compared with it,
//            the match vector and the key are registered;
//   cycle 2  the match vector is encoded: hit, hit_idx, the state of the
//            hit place (rd_state), and the first free place (free_idx).
// The answer is valid from the edge ending cycle 2 on, two clocks after
// lookup, and stays until the next lookup.
// wr_en writes rd/wr state into place wr_idx; with wr_alloc it also stores
// the registered key and marks the place valid (a new packet).  rel_en
// frees a place whose packet is complete.  The reassembly unit outside the
// page frees a place with ra_drop (for example when it gives up on a packet)
// and sees which places are in use on occupied.  A release in the same cycle
// as a write to the same place wins.
// The document fixes two places, registers rather than SRAM, and the
// two-cycle identification; the key fields, the encoding and the reassembly
// handshake are this design's own.
module frag_memory
  import tucfp_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 lookup,
  input  frag_key_t            key,
  output logic                 hit,
  output logic [SLOT_W-1:0]    hit_idx,
  output frag_state_t          rd_state,
  output logic                 free_avail,
  output logic [SLOT_W-1:0]    free_idx,
  input  logic                 wr_en,
  input  logic                 wr_alloc,
  input  logic [SLOT_W-1:0]    wr_idx,
  input  frag_state_t          wr_state,
  input  logic                 rel_en,
  input  logic [SLOT_W-1:0]    rel_idx,
  input  logic                 ra_drop,
  input  logic [SLOT_W-1:0]    ra_drop_idx,
  output logic [N_ENTRIES-1:0] occupied
);
  localparam int unsigned IDX_W = (N_ENTRIES > 1) ? $clog2(N_ENTRIES) : 1;

  frag_key_t              keys   [N_ENTRIES];
  frag_state_t            states [N_ENTRIES];
  logic [N_ENTRIES-1:0]   valid;
  logic [N_ENTRIES-1:0]   match_q;
  frag_key_t              key_q;

  assign occupied = valid;
  assign rd_state = states[hit_idx[IDX_W-1:0]];

  initial begin
    assert (N_ENTRIES >= 1 && N_ENTRIES <= (1 << SLOT_W))
      else $error("N_ENTRIES must be between 1 and %0d", 1 << SLOT_W);
  end

  // cycle 1: parallel compare
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match_q <= '0;
      key_q   <= '0;
    end else if (lookup) begin
      key_q <= key;
      for (int i = 0; i < N_ENTRIES; i++) match_q[i] <= valid[i] && (keys[i] == key);
    end
  end

  // cycle 2: encode
  logic                 lookup_d;
  logic                 hit_c, free_c;
  logic [SLOT_W-1:0]    hit_idx_c, free_idx_c;
  always_comb begin
    hit_c = 1'b0; hit_idx_c = '0;
    free_c = 1'b0; free_idx_c = '0;
    for (int i = N_ENTRIES - 1; i >= 0; i--) begin
      if (match_q[i]) begin hit_c = 1'b1;  hit_idx_c  = SLOT_W'(i); end
      if (!valid[i])  begin free_c = 1'b1; free_idx_c = SLOT_W'(i); end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lookup_d   <= 1'b0;
      hit        <= 1'b0;
      hit_idx    <= '0;
      free_avail <= 1'b0;
      free_idx   <= '0;
    end else begin
      lookup_d <= lookup;
      if (lookup_d) begin
        hit        <= hit_c;
        hit_idx    <= hit_idx_c;
        free_avail <= free_c;
        free_idx   <= free_idx_c;
      end
    end
  end

  // storage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int i = 0; i < N_ENTRIES; i++) begin
        keys[i]   <= '0;
        states[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N_ENTRIES; i++) begin
        if (wr_en && wr_idx == SLOT_W'(i)) begin
          states[i] <= wr_state;
          if (wr_alloc) begin
            keys[i]  <= key_q;
            valid[i] <= 1'b1;
          end
        end
        if ((rel_en && rel_idx == SLOT_W'(i)) || (ra_drop && ra_drop_idx == SLOT_W'(i)))
          valid[i] <= 1'b0;
      end
    end
  end


  // a write to a place that is not in use must allocate it
  property p_write_to_valid;
    @(posedge clk) disable iff (!rst_n)
      (wr_en && !wr_alloc) |-> valid[wr_idx[IDX_W-1:0]];
  endproperty
  assert property (p_write_to_valid) else $error("update of a free memory place");

endmodule

// control_logic: sequencer of the accelerator, holding the network map.
//
// The network map is a table of layers (map_entry_t). For each layer it gives
// where the layer's inputs lie in the result memory (in_base, in_count), where
// its neurons are stored (out_base, out_count), the weight pointer of the
// layer's first weight (w_base) and whether it is the last layer. Network
// inputs are written into the result memory beforehand through the data-input
// port, so every layer, the first included, reads its inputs from that memory.
//
// Neuron n of a layer is computed by computing block n mod NB in pass n / NB.
// In one pass the controller reads the layer's in_count inputs from memory,
// one per clock, and broadcasts each on the shared input bus together with a
// weight pointer; all blocks of the pass take the same word, each with its
// own weight. Block k therefore keeps, for pass p of a layer, the weight of
// input i at address w_base + p*in_count + i. Passes follow each other with
// no gap, and the results of one pass drain over the output bus while the
// next pass accumulates.
//
// Two waits keep this safe:
//  * stall: the last input of a pass is held back while any result register
//    is still full or a previous last input is still in the block pipeline,
//    so a finished sum never overwrites a waiting one (only happens for
//    layers with fewer inputs than about NB + CB_LATENCY);
//  * layer barrier: before a layer starts, every neuron of the previous layer
//    must have been written back to memory (counter of outstanding results,
//    raised when a last input is issued, lowered on each memory write from
//    the activation function).
//
// Host side: start (one-cycle pulse, taken when idle), busy, done (one-cycle
// pulse after the last layer is in memory). While idle, in_we/in_addr/in_data
// load the memory (through ld_*), map_we loads the map and out_addr reads the
// memory (out_data one clock later). Memory read latency is one clock; the
// bus word is registered so its data lines up with the memory output.
// The map itself and the distribution of data follow the reference design;
// the map format, pass order, weight layout, waits and host port are this
// design's own choices.
module control_logic
  import nna_pkg::*;
#(
  parameter int unsigned NB    = NUM_BLOCKS,
  parameter int unsigned DEPTH = MAP_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  // host control
  input  logic             start,
  output logic             busy,
  output logic             done,
  // network map load
  input  logic             map_we,
  input  logic [MAW-1:0]   map_addr,
  input  map_entry_t       map_wdata,
  // data input (to memory) and data output (from memory), used while idle
  input  logic             in_we,
  input  naddr_t           in_addr,
  input  data_t            in_data,
  input  naddr_t           out_addr,
  output data_t            out_data,
  // result memory
  output logic             ld_we,
  output naddr_t           ld_addr,
  output data_t            ld_data,
  output naddr_t           mem_raddr,
  input  data_t            mem_rdata,
  input  logic             mem_written,   // activation result stored this cycle
  // computing blocks
  output in_bus_t          bus,
  output logic [NB-1:0]    sel,
  input  logic [NB-1:0]    res_pending,
  // status
  output logic             stall,
  output logic             barrier
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT, S_DRAIN} state_t;

  map_entry_t      map [DEPTH];
  state_t          state;
  map_entry_t      cur;
  logic [MAW-1:0]  layer;
  logic [NAW:0]    nb;        // first neuron index of the current pass
  logic [NAW:0]    idx;       // input index within the pass
  wptr_t           woff;      // weight offset of this pass, p * in_count
  logic [NAW+1:0]  outstanding;

  // registered half of the bus word (data comes from the memory)
  logic            p_valid, p_first, p_last;
  wptr_t           p_wptr;
  naddr_t          p_tag;
  logic [CB_LATENCY-1:0] last_sr;

  always_ff @(posedge clk) begin
    if (map_we && state == S_IDLE) map[map_addr] <= map_wdata;
  end

  // ---------------------------------------------------------------- issue
  logic          is_last, inflight, issue, layer_end;
  logic [NAW:0]  remain, nact;
  logic [NB-1:0] mask;

  always_comb begin
    remain   = cur.out_count - nb;
    nact     = (remain > (NAW+1)'(NB)) ? (NAW+1)'(NB) : remain;
    mask     = '0;
    for (int k = 0; k < int'(NB); k++) mask[k] = (k < int'(nact));
    is_last   = (idx == cur.in_count - 1'b1);
    inflight  = (p_valid && p_last) || (|last_sr);
    stall     = (state == S_RUN) && is_last && (inflight || (|res_pending));
    issue     = (state == S_RUN) && !stall;
    layer_end = (nb + (NAW+1)'(NB) >= cur.out_count);
    barrier   = (state == S_WAIT);
    busy      = (state != S_IDLE);
    mem_raddr = busy ? naddr_t'(cur.in_base + naddr_t'(idx)) : out_addr;
  end

  assign out_data = mem_rdata;
  assign ld_we    = in_we && !busy;
  assign ld_addr  = in_addr;
  assign ld_data  = in_data;

  // bus word: control fields registered with the memory read
  always_comb begin
    bus       = '0;
    bus.valid = p_valid;
    bus.first = p_first;
    bus.last  = p_last;
    bus.data  = mem_rdata;
    bus.wptr  = p_wptr;
    bus.tag   = p_tag;
  end

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cur         <= '0;
      layer       <= '0;
      nb          <= '0;
      idx         <= '0;
      woff        <= '0;
      outstanding <= '0;
      done        <= 1'b0;
      p_valid     <= 1'b0;
      p_first     <= 1'b0;
      p_last      <= 1'b0;
      p_wptr      <= '0;
      p_tag       <= '0;
      sel         <= '0;
      last_sr     <= '0;
    end else begin
      done    <= 1'b0;
      p_valid <= issue;
      last_sr <= {last_sr[CB_LATENCY-2:0], p_valid && p_last};
      outstanding <= outstanding
                     + ((issue && is_last) ? (NAW+2)'(nact) : '0)
                     - (mem_written ? (NAW+2)'(1) : '0);
      if (issue) begin
        p_first <= (idx == '0);
        p_last  <= is_last;
        p_wptr  <= wptr_t'(cur.w_base + woff + wptr_t'(idx));
        p_tag   <= naddr_t'(cur.out_base + naddr_t'(nb));
        sel     <= mask;
      end

      unique case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_RUN;
            layer <= '0;
            cur   <= map[0];
            nb    <= '0;
            idx   <= '0;
            woff  <= '0;
          end
        end
        S_RUN: begin
          if (issue) begin
            if (!is_last) begin
              idx <= idx + 1'b1;
            end else if (!layer_end) begin
              idx   <= '0;
              nb    <= nb + (NAW+1)'(NB);
              woff  <= wptr_t'(woff + wptr_t'(cur.in_count));
            end else begin
              state <= cur.last ? S_DRAIN : S_WAIT;
            end
          end
        end
        S_WAIT: begin
          if (outstanding == '0) begin
            state <= S_RUN;
            layer <= layer + 1'b1;
            cur   <= map[layer + 1'b1];
            nb    <= '0;
            idx   <= '0;
            woff  <= '0;
          end
        end
        S_DRAIN: begin
          if (outstanding == '0 && !p_valid) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A layer needs at least one input and one neuron
  a_layer_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RUN) |-> (cur.in_count != '0 && cur.out_count != '0));
  // More results can never be written than were started
  a_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    mem_written |-> (outstanding != '0));

endmodule

// layer_ctrl: sequencer of the binary-weight network layers.
//
// A 3x3xNxM convolution runs on 3*M PEs: PE k of group m computes kernel
// column k of output channel m. For every output position (oy, ox), in row
// order with ox innermost, the controller loops kernel row ky and input
// channel n, one (ky, n) per cycle, so a position takes 3N cycles. Each
// cycle it issues three data-memory reads (one per kernel column) and one
// weight read of 3*M bits. One cycle later the data arrive and the PE
// controls (pe_en, pe_clr) are presented aligned with them. After the last
// element one cycle lets the PEs finish, then M write-back cycles (wb) send
// the channels one by one through BN-ReLU to the data memory; the last
// write-back cycle pushes the third PE's Rb into the reuse buffer. Each new
// output row clears the reuse buffers.
//
// The fully connected layer treats the 4400 stored activations as one
// stream: in cycle c PE k of group o takes input 3c+k (col_valid masks the
// tail). After the last cycle fc_valid is raised for one cycle with all
// group sums valid. done pulses after the last layer.
//
// The layer table (layers, n_layers of its entries from entry 0) is an
// input, so the input size and the number of cascaded layers can be set at
// run time; it must not change while busy. The loop order, the one-cycle
// memory latency and the serial write-back are this design's choices.
module layer_ctrl
  import speech_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  layer_t [NLAYER-1:0]         layers,
  input  logic [1:0]                  n_layers,
  input  logic                        reuse_en,
  output logic                        busy,
  output logic                        done,
  // memory reads (issue cycle)
  output logic                        d_re,
  output logic [NCOL-1:0][DADDR_W-1:0] d_raddr,
  output logic                        w_re,
  output logic [WADDR_W-1:0]          w_raddr,
  // PE controls (aligned with read data)
  output logic                        pe_en,
  output logic                        pe_clr,
  output logic [NCOL-1:0]             col_valid,
  output logic                        reuse_active,
  output logic                        buf_dist,
  output logic [5:0]                  n_groups,
  output logic                        is_fc,
  output logic [1:0]                  layer_idx,
  // reuse buffer controls
  output logic                        buf_clear,
  output logic                        buf_push,
  // write-back
  output logic                        wb,
  output logic [4:0]                  wb_ch,
  output logic [DADDR_W-1:0]          wb_addr,
  output logic                        fc_valid
);

  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_WAIT, S_WB, S_FCOUT, S_DONE} state_e;
  state_e state;

  logic [1:0]  li;
  layer_t      L;
  logic [7:0]  oy, ox, ky;
  logic [5:0]  n;
  logic [10:0] c;
  logic [4:0]  wbc;
  logic [WADDR_W-1:0] wptr;
  logic        last_elem, last_layer;
  layer_t      L_next;

  assign L          = layers[li];
  assign last_layer = (li == n_layers - 2'd1);
  assign L_next     = last_layer ? layers[0] : layers[li + 2'd1];

  // last element of the current position (conv) or of the layer (FC)
  always_comb begin
    if (L.kind == L_FC)
      last_elem = (32'(c) * 3 + 3 >= 32'(L.fc_len));
    else
      last_elem = (ky == 8'd2) && (n == L.in_c - 6'd1);
  end

  // issue-cycle read addresses
  always_comb begin
    for (int k = 0; k < NCOL; k++) begin
      if (L.kind == L_FC) begin
        d_raddr[k] = DADDR_W'(32'(L.in_base) + 32'(c) * 3 + k);
      end else begin
        d_raddr[k] = DADDR_W'(32'(L.in_base)
                     + ((32'(oy) * L.stride + 32'(ky)) * L.in_w + 32'(ox) * L.stride + k) * L.in_c
                     + n);
      end
    end
  end
  assign d_re    = (state == S_ISSUE);
  assign w_re    = (state == S_ISSUE);
  assign w_raddr = wptr;

  // controls delayed by the memory latency
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pe_en     <= 1'b0;
      pe_clr    <= 1'b0;
      col_valid <= '0;
    end else begin
      pe_en  <= (state == S_ISSUE);
      pe_clr <= (state == S_ISSUE) &&
                ((L.kind == L_FC) ? (c == '0) : (ky == '0 && n == '0));
      for (int k = 0; k < NCOL; k++)
        col_valid[k] <= (L.kind != L_FC) || (32'(c) * 3 + k < 32'(L.fc_len));
    end
  end

  assign is_fc        = (L.kind == L_FC);
  assign layer_idx    = li;
  assign n_groups     = L.out_c;
  assign buf_dist     = (L.stride == 2'd1);
  assign reuse_active = reuse_en && (L.kind == L_CONV) &&
                        (L.stride == 2'd1 || L.stride == 2'd2);
  assign busy         = (state != S_IDLE);
  assign done         = (state == S_DONE);
  assign wb           = (state == S_WB);
  assign wb_ch        = wbc;
  assign wb_addr      = DADDR_W'(32'(L.out_base) + (32'(oy) * L.out_w + 32'(ox)) * L.out_c + wbc);
  assign fc_valid     = (state == S_FCOUT);
  assign buf_push     = (state == S_WB) && (wbc == 5'(L.out_c - 6'd1));
  assign buf_clear    = (state == S_ISSUE) && (L.kind == L_CONV) &&
                        ox == '0 && ky == '0 && n == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      li    <= '0;
      oy    <= '0;
      ox    <= '0;
      ky    <= '0;
      n     <= '0;
      c     <= '0;
      wbc   <= '0;
      wptr  <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_ISSUE;
          li <= '0; oy <= '0; ox <= '0; ky <= '0; n <= '0; c <= '0; wbc <= '0;
          wptr <= layers[0].w_base;
        end
        S_ISSUE: begin
          wptr <= wptr + WADDR_W'(32'(L.out_c) * 3);
          if (last_elem) begin
            state <= S_WAIT;
          end else if (L.kind == L_FC) begin
            c <= c + 1'b1;
          end else if (n == L.in_c - 6'd1) begin
            n  <= '0;
            ky <= ky + 1'b1;
          end else begin
            n <= n + 1'b1;
          end
        end
        S_WAIT: begin
          state <= (L.kind == L_FC) ? S_FCOUT : S_WB;
          wbc   <= '0;
        end
        S_WB: begin
          if (wbc == 5'(L.out_c - 6'd1)) begin
            wbc <= '0;
            ky  <= '0;
            n   <= '0;
            wptr <= L.w_base;
            state <= S_ISSUE;
            if (ox == L.out_w - 8'd1) begin
              ox <= '0;
              if (oy == L.out_h - 8'd1) begin
                oy <= '0;
                if (last_layer) begin
                  state <= S_DONE;
                end else begin
                  li   <= li + 1'b1;
                  wptr <= L_next.w_base;
                end
              end else begin
                oy <= oy + 1'b1;
              end
            end else begin
              ox <= ox + 1'b1;
            end
          end else begin
            wbc <= wbc + 1'b1;
          end
        end
        S_FCOUT: begin
          if (last_layer) begin
            state <= S_DONE;
          end else begin
            li    <= li + 1'b1;
            c     <= '0;
            wptr  <= L_next.w_base;
            state <= S_ISSUE;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

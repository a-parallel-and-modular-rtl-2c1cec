// ldpc_ctrl: sequencer of the decoding passes.
//
// One decoding iteration is NSCEN bit-node passes (the scenarios, each updating four bit-node
// sets in parallel on the four modules) followed by SETS_PER_MOD check-node passes (each
// module updating one of its check-node sets). Decoding runs n_iter iterations and a final
// set of bit-node passes that produces the hard decisions ('final_pass'); the bit-node
// passes of the first iteration have 'first' set, so they start from v = channel LLR.
// Every pass takes z + LAT + 2 cycles: one cycle for the configuration memory to answer,
// then rd_start, the z reads, and the LAT-cycle drain in which the last results are written
// back (wr_start follows rd_start by LAT cycles). A decode of n_iter iterations therefore
// takes (9*n_iter + 6)*(z + LAT + 2) cycles, and done rises one cycle after that, counted
// from the cycle in which start is sampled. The document fixes the
// split into scenarios and check-node sets; the pass timing and the drain between passes
// are this design's choice.
// Interface: start (one cycle, while idle) with z and n_iter stable until done; done pulses
// for one cycle after the last write.
module ldpc_ctrl
  import ldpc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [ZW-1:0]   z,
  input  logic [5:0]      n_iter,
  output logic            phase_cn,
  output logic [2:0]      pass,
  output logic            first,
  output logic            final_pass,
  output logic            rd_start,
  output logic            wr_start,
  output logic            busy,
  output logic            done
);
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_RUN} state_t;

  state_t      state;
  logic [7:0]  t;        // cycle within the running pass
  logic [5:0]  iter;

  assign rd_start = (state == S_RUN) && (t == 8'd0);
  assign wr_start = (state == S_RUN) && (t == 8'(LAT));
  assign busy     = (state != S_IDLE);
  assign first    = (iter == 6'd0) && !phase_cn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      t          <= '0;
      iter       <= '0;
      pass       <= '0;
      phase_cn   <= 1'b0;
      final_pass <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state      <= S_SETUP;
          iter       <= '0;
          pass       <= '0;
          phase_cn   <= 1'b0;
          final_pass <= (n_iter == 6'd0);
        end
        S_SETUP: begin
          state <= S_RUN;
          t     <= '0;
        end
        S_RUN: begin
          t <= t + 8'd1;
          if (t == 8'(LAT) + 8'(z)) begin
            state <= S_SETUP;
            if (!phase_cn) begin
              if (pass == 3'(NSCEN - 1)) begin
                pass <= '0;
                if (final_pass) begin
                  state <= S_IDLE;
                  done  <= 1'b1;
                end else begin
                  phase_cn <= 1'b1;
                end
              end else begin
                pass <= pass + 3'd1;
              end
            end else begin
              if (pass == 3'(SETS_PER_MOD - 1)) begin
                pass     <= '0;
                phase_cn <= 1'b0;
                iter     <= iter + 6'd1;
                if (iter + 6'd1 == n_iter) final_pass <= 1'b1;
              end else begin
                pass <= pass + 3'd1;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new decode may only be started while idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);
endmodule

`timescale 1ps/1ps
// pci9054_local_model: behavioural model of the PCI bridge's local-bus DMA master
// (C mode), for testbenches only.
//
// While DREQ# is low and the model is enabled it requests the local bus
// (LHOLD), waits for LHOLDA, drives ADS# low for one clock with LW/R# low
// (read), then runs BURST data phases, each ending at a clock edge with
// READY# low; BLAST# is low during the last one. Every word read is presented
// on word_valid/word for one clock. After the burst LHOLD is released for at
// least one clock. A pulse on wr_req makes it perform one single-word write
// (LW/R# high) instead, reported on wr_acked. Host-side PCI behaviour is not
// modelled.
module pci9054_local_model #(
  parameter int BURST = 16
) (
  input  logic        lclk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        wr_req,
  output logic        lhold,
  input  logic        lholda,
  output logic        ads_n,
  output logic        blast_n,
  output logic        lw_r_n,
  input  logic        ready_n,
  input  logic [31:0] ld,
  input  logic        dreq_n,
  output logic        word_valid,
  output logic [31:0] word,
  output logic        wr_acked
);

  typedef enum logic [1:0] {M_IDLE, M_HOLD, M_DATA, M_GAP} mstate_e;
  mstate_e state;
  int      beat, nbeats;
  logic    pending_wr;

  assign blast_n = !(state == M_DATA && beat == nbeats - 1);

  always_ff @(posedge lclk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_IDLE;
      lhold      <= 1'b0;
      ads_n      <= 1'b1;
      lw_r_n     <= 1'b0;
      beat       <= 0;
      nbeats     <= 1;
      word_valid <= 1'b0;
      word       <= '0;
      wr_acked   <= 1'b0;
      pending_wr <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      wr_acked   <= 1'b0;
      if (wr_req) pending_wr <= 1'b1;
      unique case (state)
        M_IDLE: if (pending_wr || (enable && !dreq_n)) begin
          lhold <= 1'b1;
          state <= M_HOLD;
        end
        M_HOLD: if (lholda) begin
          ads_n  <= 1'b0;
          lw_r_n <= pending_wr;
          nbeats <= pending_wr ? 1 : BURST;
          beat   <= 0;
          state  <= M_DATA;
        end
        M_DATA: begin
          ads_n <= 1'b1;
          if (!ads_n) ;                      // address phase
          else if (!ready_n) begin
            if (lw_r_n) wr_acked <= 1'b1;
            else begin
              word_valid <= 1'b1;
              word       <= ld;
            end
            beat <= beat + 1;
            if (beat == nbeats - 1) begin
              if (lw_r_n) pending_wr <= 1'b0;
              lhold <= 1'b0;
              state <= M_GAP;
            end
          end
        end
        M_GAP: state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

endmodule

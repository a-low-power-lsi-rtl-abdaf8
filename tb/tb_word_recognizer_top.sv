// End-to-end testbench of the word recognizer: a 6-frame utterance scored
// against 8 word models, with the design at its default parameters.
module tb_word_recognizer_top;
  tb_top_harness #(.W(8), .T(6), .MAXCYC(2_000_000)) h ();
endmodule
